// tb_ring_pointer -- self-checking test of the circular one-hot pointer.
// Advances the pointer at random through several wraps and compares the
// binary index, the one-hot decode and the look-ahead decode with a model
// counter, cycle by cycle.
module tb_ring_pointer;
  localparam int unsigned N = 64;
  logic clk = 0, rst_n = 0, advance = 0;
  logic [5:0] ptr;
  logic [N-1:0] oh, nxt;
  int checks = 0, failures = 0, model = 0, wraps = 0;

  ring_pointer #(.ENTRIES(N)) dut (.clk, .rst_n, .advance, .ptr, .ptr_onehot(oh), .next_onehot(nxt));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ptr=%0d model=%0d", what, ptr, model); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      check(ptr == 6'(model), "index");
      check(oh == (N'(1) << model), "one-hot");
      check(nxt == (N'(1) << ((model + 1) % N)), "next one-hot");
      advance = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (advance) begin
        if (model == N - 1) wraps++;
        model = (model + 1) % N;
      end
    end
    check(wraps >= 2, "wrapped around");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
