// tb_drcmos_mux4 -- self-checking test of the DRCMOS 4:1 one-hot mux cell.
// Random data with every one-hot select and the all-zero select, in both
// the awake and the sleeping state: the output must be the selected input
// either way (the slow subcircuit keeps the function).
module tb_drcmos_mux4;
  localparam int unsigned W = 9;
  logic [3:0][W-1:0] d;
  logic [3:0] sel;
  logic wake;
  logic [W-1:0] y;
  int checks = 0, failures = 0;

  drcmos_mux4 #(.WIDTH(W)) dut (.d, .sel, .wake, .y);

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [W-1:0] want;
      int s;
      for (int i = 0; i < 4; i++) d[i] = W'($urandom);
      s = $urandom_range(0, 4);
      sel = (s == 4) ? 4'b0000 : 4'(1 << s);
      wake = $urandom_range(0, 1) == 1;
      want = (s == 4) ? '0 : d[s];
      #1;
      checks++;
      if (y != want) begin failures++; $display("FAIL y=%h want %h sel=%b wake=%b", y, want, sel, wake); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
