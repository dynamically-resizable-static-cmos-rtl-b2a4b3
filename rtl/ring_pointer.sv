// ring_pointer -- circular pointer over the entries of a 64-entry ring
// (the read pointer and the write pointer of the register free list).
//
// The pointer is held as a binary index and advances by one, wrapping from
// the last entry to entry 0, in each cycle that `advance` is high. It is
// also presented decoded as a one-hot vector (ptr_onehot, the rp<0:63> /
// wp<0:63> lines that drive the array), and the one-hot position of the
// following entry (next_onehot) is given for look-ahead wakeup logic.
// Storing the pointer as a binary index rather than as a one-hot shift
// ring is a choice of this implementation; the outputs are the same.
//
// Timing: one register; outputs change on the clock edge after `advance`.
// Reset (synchronous, active low) puts the pointer at entry 0.
module ring_pointer #(
  parameter int unsigned ENTRIES = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       advance,
  output logic [$clog2(ENTRIES)-1:0] ptr,
  output logic [ENTRIES-1:0]         ptr_onehot,
  output logic [ENTRIES-1:0]         next_onehot
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [IW-1:0] ptr_q, ptr_inc;

  always_comb begin
    if (ptr_q == IW'(ENTRIES - 1)) ptr_inc = '0;
    else                           ptr_inc = ptr_q + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       ptr_q <= '0;
    else if (advance) ptr_q <= ptr_inc;
  end

  always_comb begin
    ptr_onehot  = '0;
    next_onehot = '0;
    ptr_onehot[ptr_q]    = 1'b1;
    next_onehot[ptr_inc] = 1'b1;
  end

  assign ptr = ptr_q;
endmodule
