// tb_pick_one_arbiter -- self-checking test of the 64-entry pick-one tree.
// Phase 1, all cells awake: random request vectors of varying density; the
// grant must be the lowest-numbered request (none when enable is low or no
// request), anyreq the OR of all requests. Phase 2, random wake sets: the
// leaf fast state must equal the previous cycle's wake request, the middle
// cells the OR of their children; requests confined to awake cells must
// be granted as before, and a request in a sleeping cell must raise `lost`.
module tb_pick_one_arbiter;
  import drcmos_pkg::*;
  logic clk = 0, rst_n = 0, enable = 1, anyreq, lost;
  logic [ENTRIES-1:0] req = '0, entry_wake = '1, grant;
  logic [N_STAGE1-1:0] s1, m1;
  logic [N_STAGE2-1:0] s2, m2;
  int checks = 0, failures = 0, losts = 0;

  pick_one_arbiter dut (.clk, .rst_n, .req, .enable, .entry_wake, .grant, .anyreq,
                        .stage1_fast(s1), .stage2_fast(s2), .lost);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s req=%h grant=%h", what, req, grant); end
  endtask

  function automatic logic [ENTRIES-1:0] lowest(input logic [ENTRIES-1:0] r);
    for (int i = 0; i < int'(ENTRIES); i++) if (r[i]) return ENTRIES'(1) << i;
    return '0;
  endfunction

  function automatic logic [ENTRIES-1:0] rand_req(input int density);
    logic [ENTRIES-1:0] r;
    for (int i = 0; i < int'(ENTRIES); i++) r[i] = ($urandom_range(0, 99) < density);
    return r;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      req = rand_req(c % 4 == 0 ? 2 : (c % 4) * 15);
      enable = (c % 9 != 0);
      #1;
      check(grant == (enable ? lowest(req) : '0), "grant");
      check(anyreq == |req, "anyreq");
      check(!lost, "nothing lost while awake");
    end
    m1 = '1;
    for (int c = 0; c < 400; c++) begin
      logic [ENTRIES-1:0] awake_mask;
      @(negedge clk);
      for (int k = 0; k < int'(N_STAGE2); k++) m2[k] = |m1[4*k +: 4];
      for (int i = 0; i < int'(ENTRIES); i++) awake_mask[i] = m1[i / 4];
      enable = 1;
      req = rand_req(20) & awake_mask;
      if (c % 5 == 0) req[$urandom_range(0, ENTRIES - 1)] = 1'b1;   // may hit a sleeping cell
      #1;
      check(s1 == m1, "leaf fast state");
      check(s2 == m2, "middle fast state");
      check(lost == |(req & ~awake_mask), "lost flag");
      if (lost) losts++;
      else check(grant == lowest(req), "grant with sleeping cells");
      entry_wake = rand_req(10);
      @(posedge clk);
      for (int j = 0; j < int'(N_STAGE1); j++) m1[j] = |entry_wake[4*j +: 4];
    end
    check(losts > 0, "lost requests seen");
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
