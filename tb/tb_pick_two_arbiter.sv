// tb_pick_two_arbiter -- self-checking test of the 64-entry pick-two
// arbiter. Random request vectors of densities from 0 to 100% with all
// cells awake: grant1 must be the lowest-numbered request and grant2 the
// second lowest (none if fewer requests), both zero when enable is low.
// Then requests confined to the awake part of a random wake set, which must
// be granted the same way with nothing lost.
module tb_pick_two_arbiter;
  import drcmos_pkg::*;
  logic clk = 0, rst_n = 0, enable = 1, lost;
  logic [ENTRIES-1:0] req = '0, entry_wake = '1, grant1, grant2;
  logic [N_STAGE1-1:0] s1, m1;
  logic [N_STAGE2-1:0] s2;
  int checks = 0, failures = 0, twos = 0;

  pick_two_arbiter dut (.clk, .rst_n, .req, .enable, .entry_wake, .grant1, .grant2,
                        .stage1_fast(s1), .stage2_fast(s2), .lost);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s req=%h g1=%h g2=%h", what, req, grant1, grant2); end
  endtask

  task automatic pick(input logic [ENTRIES-1:0] r, output logic [ENTRIES-1:0] a, output logic [ENTRIES-1:0] b);
    a = '0; b = '0;
    for (int i = 0; i < int'(ENTRIES); i++)
      if (r[i]) begin
        if (a == '0) a = ENTRIES'(1) << i;
        else if (b == '0) b = ENTRIES'(1) << i;
      end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int c = 0; c < 500; c++) begin
      logic [ENTRIES-1:0] a, b;
      @(negedge clk);
      for (int i = 0; i < int'(ENTRIES); i++) req[i] = ($urandom_range(0, 99) < (c % 11) * 10);
      if (c % 13 == 0) req = ENTRIES'(1) << $urandom_range(0, ENTRIES - 1);
      enable = (c % 17 != 0);
      #1;
      pick(req, a, b);
      if (!enable) begin a = '0; b = '0; end
      check(grant1 == a, "grant1");
      check(grant2 == b, "grant2");
      check(!lost, "nothing lost");
      if (b != '0) twos++;
    end
    m1 = '1;
    enable = 1;
    for (int c = 0; c < 300; c++) begin
      logic [ENTRIES-1:0] a, b, mask;
      @(negedge clk);
      for (int i = 0; i < int'(ENTRIES); i++) mask[i] = m1[i / 4];
      for (int i = 0; i < int'(ENTRIES); i++) req[i] = ($urandom_range(0, 99) < 30);
      req &= mask;
      #1;
      pick(req, a, b);
      check(s1 == m1, "leaf fast state");
      check(grant1 == a && grant2 == b, "grants with sleeping cells");
      check(!lost, "nothing lost");
      for (int i = 0; i < int'(ENTRIES); i++) entry_wake[i] = ($urandom_range(0, 99) < 15);
      @(posedge clk);
      for (int j = 0; j < int'(N_STAGE1); j++) m1[j] = |entry_wake[4*j +: 4];
    end
    check(twos > 100, "two grants per cycle seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
