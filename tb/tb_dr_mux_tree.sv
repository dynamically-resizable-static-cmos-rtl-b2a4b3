// tb_dr_mux_tree -- self-checking test of the resizable 64-entry read tree.
// Each cycle a random entry is selected through select<0:11> and a random
// set of entries is marked for wakeup. Checked against a model: the read
// data equals the selected word whether or not the path is awake; the
// first-stage fast state is the previous cycle's wake request; each
// second-stage mux is awake when any child is; `late` is set exactly when
// the selected path crosses a sleeping mux.
module tb_dr_mux_tree;
  import drcmos_pkg::*;
  localparam int unsigned W = 9;
  logic clk = 0, rst_n = 0;
  logic [ENTRIES-1:0][W-1:0] words;
  logic [SEL_W-1:0] select;
  logic [ENTRIES-1:0] entry_wake;
  logic [W-1:0] dout;
  logic [N_STAGE1-1:0] s1;
  logic [N_STAGE2-1:0] s2;
  logic late;
  logic [N_STAGE1-1:0] m1;   // model of first-stage fast state
  int checks = 0, failures = 0, lates = 0, sleeps = 0;

  dr_mux_tree #(.WIDTH(W)) dut (.clk, .rst_n, .words, .select, .entry_wake,
                                .dout, .stage1_fast(s1), .stage2_fast(s2), .late);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < int'(ENTRIES); i++) words[i] = W'($urandom);
    select = 12'b0001_0001_0001; entry_wake = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m1 = '1;
    for (int c = 0; c < 600; c++) begin
      int e;
      logic [N_STAGE2-1:0] m2;
      bit mlate;
      @(negedge clk);
      e = $urandom_range(0, ENTRIES - 1);
      select = '0;
      select[e % 4] = 1'b1; select[4 + (e / 4) % 4] = 1'b1; select[8 + e / 16] = 1'b1;
      if (c % 7 == 0) words[$urandom_range(0, ENTRIES - 1)] = W'($urandom);
      #1;
      for (int k = 0; k < int'(N_STAGE2); k++) m2[k] = |m1[4*k +: 4];
      mlate = !m1[e / 4] || !m2[e / 16];
      check(dout == words[e], "read data");
      check(s1 == m1, "stage-1 fast state");
      check(s2 == m2, "stage-2 fast state");
      check(late == mlate, "late flag");
      if (mlate) lates++;
      if (s1 != '1) sleeps++;
      // wake request for the next cycle: random sparse set
      entry_wake = '0;
      for (int n = 0; n < 4; n++) entry_wake[$urandom_range(0, ENTRIES - 1)] = 1'b1;
      @(posedge clk);
      for (int j = 0; j < int'(N_STAGE1); j++) m1[j] = |entry_wake[4*j +: 4];
    end
    check(lates > 0 && sleeps > 0, "late reads and sleeping muxes both seen");
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
