// fl_sram -- the 64-entry x 9-bit storage array of the register free list
// slice.
//
// Writes are word-line style: `wen` is a one-hot (or all-zero) vector, and
// every entry whose wen bit is high takes `wdata` on the rising clock edge.
// There is no read port inside the array: every stored word is presented on
// `words` and the read port is the separate mux tree that follows, as in
// the design, where the static mux trees select the entry under the read
// pointer. The array is not reset (the contents of unwritten entries are
// undefined, as in an SRAM).
module fl_sram #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned WIDTH   = 9
) (
  input  logic                           clk,
  input  logic [ENTRIES-1:0]             wen,
  input  logic [WIDTH-1:0]               wdata,
  output logic [ENTRIES-1:0][WIDTH-1:0]  words
);
  logic [WIDTH-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(ENTRIES); i++)
      if (wen[i]) mem[i] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < int'(ENTRIES); i++) words[i] = mem[i];
  end
endmodule
