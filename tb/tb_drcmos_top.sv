// tb_drcmos_top -- end-to-end test of drcmos_top at its default (full)
// size: 64-entry free list slice of 9-bit registers and 64-entry pick-two
// arbiter over a 64-entry circular issue window.
//
// Free list: filled with register numbers, then run at read activity
// factors of 0%, 30%, 60% and 90% (share of cycles that allocate) against a
// queue model; the allocated register must be the model's head in the same
// cycle, and no read may cross a sleeping mux.
// Arbiter: the window occupancy is steered to targets of 0, 6, 16, 32 and
// 64 entries; entries in the full area raise requests with a chosen ready
// fraction (all, half, or a fixed 16 ready entries). grant1/grant2 must be
// the two lowest-numbered requests in the same cycle, nothing may be lost
// in a sleeping cell, and the leaf cells outside the woken area must be
// small. Each mechanism of the design is counted and must occur: read
// pointer wrap, first- and second-stage mux upsizing moving, free list full
// and empty, window pointer wrap, arbiter cells sleeping and waking, two
// grants in one cycle.
module tb_drcmos_top;
  import drcmos_pkg::*;
  logic clk = 0, rst_n = 0;
  logic free_valid = 0, fl_alloc = 0, issue_enable = 1;
  logic [REG_W-1:0] free_reg = '0, alloc_reg;
  logic fl_empty, fl_full, fl_late, arb_lost;
  logic [6:0] fl_count, iw_count;
  logic [SEL_W-1:0] fl_select;
  logic [N_STAGE1-1:0] fl_s1, arb_s1, prev_fl_s1, prev_arb_s1;
  logic [N_STAGE2-1:0] fl_s2, arb_s2, prev_fl_s2;
  logic [1:0] iw_alloc_n = '0, iw_retire_n = '0;
  logic [ENTRIES-1:0] req = '0, iw_full_mask, grant1, grant2;
  logic [5:0] iw_head, iw_tail;

  drcmos_top dut (
    .clk, .rst_n,
    .free_valid, .free_reg, .fl_alloc, .alloc_reg, .fl_empty, .fl_full, .fl_count,
    .fl_stage1_fast(fl_s1), .fl_stage2_fast(fl_s2), .fl_late, .fl_select,
    .iw_alloc_n, .iw_retire_n, .req, .issue_enable,
    .iw_head, .iw_tail, .iw_count, .iw_full_mask, .grant1, .grant2,
    .arb_stage1_fast(arb_s1), .arb_stage2_fast(arb_s2), .arb_lost
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_rp_wrap = 0, n_s1_move = 0, n_s2_move = 0, n_fl_full = 0, n_fl_empty = 0;
  int n_iw_wrap = 0, n_cell_sleep = 0, n_cell_wake = 0, n_two_grants = 0, n_alloc = 0;
  int s1_upsized_sum = 0, arb_small_sum = 0, cycles = 0;

  logic [REG_W-1:0] q[$];
  int rp_model = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic void lowest_two(input logic [ENTRIES-1:0] r,
                                     output logic [ENTRIES-1:0] a, output logic [ENTRIES-1:0] b);
    a = '0; b = '0;
    for (int i = 0; i < int'(ENTRIES); i++)
      if (r[i]) begin
        if (a == '0) a = ENTRIES'(1) << i;
        else if (b == '0) b = ENTRIES'(1) << i;
      end
  endfunction

  // One cycle of both halves. read_pct: allocation probability; occ: target
  // window occupancy; ready_mode: 0 all full entries ready, 1 half, 2 at most 16.
  task automatic cycle(input int read_pct, input int free_pct, input int occ, input int ready_mode);
    logic [ENTRIES-1:0] a, b;
    int nready;
    @(negedge clk);
    cycles++;
    // ---- free list checks
    check(fl_count == 7'(q.size()) && fl_empty == (q.size() == 0) && fl_full == (q.size() == 64),
          "free list occupancy");
    if (q.size() != 0) check(alloc_reg == q[0], "allocated register");
    check(!fl_late, "no late free-list read");
    s1_upsized_sum += $countones(fl_s1);
    if (fl_full) n_fl_full++;
    if (fl_empty) n_fl_empty++;
    // ---- arbiter stimulus and checks
    req = '0; nready = 0;
    for (int d = 0; d < int'(iw_count); d++) begin
      int e;
      bit r;
      e = (int'(iw_head) + d) % 64;
      case (ready_mode)
        0: r = 1'b1;
        1: r = ($urandom_range(0, 1) == 1);
        default: r = (nready < 16) && ($urandom_range(0, 1) == 1);
      endcase
      req[e] = r;
      if (r) nready++;
    end
    #1;
    lowest_two(req, a, b);
    check(grant1 == a && grant2 == b, "two oldest-by-index grants");
    check(!arb_lost, "no request lost in a sleeping cell");
    check((req & ~iw_full_mask) == '0, "requests only from the full area");
    if (b != '0) n_two_grants++;
    arb_small_sum += N_STAGE1 - $countones(arb_s1);
    if (arb_s1 != '1) n_cell_sleep++;
    if ((arb_s1 & ~prev_arb_s1) != '0) n_cell_wake++;
    if (fl_s1 != prev_fl_s1) n_s1_move++;
    if (fl_s2 != prev_fl_s2) n_s2_move++;
    prev_fl_s1 = fl_s1; prev_fl_s2 = fl_s2; prev_arb_s1 = arb_s1;
    // ---- next operations
    fl_alloc   = (q.size() != 0) && ($urandom_range(0, 99) < read_pct);
    free_valid = (q.size() != 64) && ($urandom_range(0, 99) < free_pct);
    free_reg   = REG_W'($urandom);
    iw_alloc_n  = (int'(iw_count) < occ) ? 2'($urandom_range(1, 2)) : 2'($urandom_range(0, 1));
    iw_retire_n = (int'(iw_count) > occ) ? 2'($urandom_range(1, 2)) : 2'($urandom_range(0, 1));
    if (int'(iw_alloc_n) > 64 - int'(iw_count)) iw_alloc_n = 2'(64 - int'(iw_count));
    if (int'(iw_retire_n) > int'(iw_count)) iw_retire_n = 2'(iw_count);
    if (int'(iw_head) + int'(iw_retire_n) >= 64) n_iw_wrap++;
    @(posedge clk);
    if (fl_alloc) begin
      void'(q.pop_front());
      n_alloc++;
      if (rp_model == 63) n_rp_wrap++;
      rp_model = (rp_model + 1) % 64;
    end
    if (free_valid) q.push_back(free_reg);
  endtask

  initial begin
    prev_fl_s1 = '1; prev_fl_s2 = '1; prev_arb_s1 = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill the free list with registers 64..127 while the window fills to 6
    for (int i = 0; i < 70; i++) cycle(0, 100, 6, 0);
    // read activity factor sweep, window occupancy sweep
    for (int a = 0; a < 4; a++) begin
      for (int i = 0; i < 250; i++) cycle(a * 30, 40 + a * 15, 6, 1);
      for (int i = 0; i < 250; i++) cycle(a * 30, 40 + a * 15, a == 3 ? 32 : 16 * a, a == 2 ? 2 : 1);
    end
    for (int i = 0; i < 300; i++) cycle(90, 90, 64, 0);   // full window, all ready
    for (int i = 0; i < 100; i++) cycle(100, 0, 0, 0);    // drain both
    $display("mechanisms: rp_wrap=%0d s1_move=%0d s2_move=%0d fl_full=%0d fl_empty=%0d",
             n_rp_wrap, n_s1_move, n_s2_move, n_fl_full, n_fl_empty);
    $display("            iw_wrap=%0d cell_sleep=%0d cell_wake=%0d two_grants=%0d allocs=%0d",
             n_iw_wrap, n_cell_sleep, n_cell_wake, n_two_grants, n_alloc);
    $display("average upsized first-stage muxes %0d/1000 of 16, average small leaf arbiter cells %0d/1000 of 16",
             s1_upsized_sum * 1000 / cycles, arb_small_sum * 1000 / cycles);
    check(n_rp_wrap > 0, "read pointer wrapped");
    check(n_s1_move > 0, "first-stage upsizing moved");
    check(n_s2_move > 0, "second-stage upsizing moved");
    check(n_fl_full > 0, "free list full");
    check(n_fl_empty > 0, "free list empty");
    check(n_iw_wrap > 0, "issue window wrapped");
    check(n_cell_sleep > 0, "arbiter cells slept");
    check(n_cell_wake > 0, "arbiter cells woke");
    check(n_two_grants > 0, "two grants in a cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
