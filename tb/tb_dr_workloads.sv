// tb_dr_workloads -- runs drcmos_top at its default size through each
// operating point of the evaluation, one at a time, and reports how much of
// each tree stays downsized.
//
// Free list: read activity factors 0%, 30%, 60% and 90% (share of cycles
// that allocate a register), with frees keeping the list about half full.
// Per point it checks every allocated register against a queue model, that
// no read is late and that at most 2 of 16 first-stage and 2 of 4
// second-stage muxes are upsized, and prints the average upsized counts.
//
// Arbiter: the issue window is held at 0, 6, 16 and 32 occupied entries
// (dispatch and retire balanced once there). Entries of the full area
// request with a 50% ready probability. Per point it checks both grants
// against a model and that nothing is lost, and bounds the leaf cells that
// are awake: at least those covering the full area, and no more than those
// covering the full area plus the two next dispatch slots
// (ceil((N + 2) / 4) + 1 cells for N occupied entries).
module tb_dr_workloads;
  import drcmos_pkg::*;
  logic clk = 0, rst_n = 0;
  logic free_valid = 0, fl_alloc = 0, issue_enable = 1;
  logic [REG_W-1:0] free_reg = '0, alloc_reg;
  logic fl_empty, fl_full, fl_late, arb_lost;
  logic [6:0] fl_count, iw_count;
  logic [SEL_W-1:0] fl_select;
  logic [N_STAGE1-1:0] fl_s1, arb_s1;
  logic [N_STAGE2-1:0] fl_s2, arb_s2;
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
  logic [REG_W-1:0] q[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic free_list_point(input int read_pct);
    int s1_sum = 0, s2_sum = 0, reads = 0;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      if (q.size() != 0) check(alloc_reg == q[0], "allocated register");
      check(fl_count == 7'(q.size()), "occupancy");
      check(!fl_late, "no late read");
      check($countones(fl_s1) <= 2 && $countones(fl_s2) <= 2, "upsized mux bound");
      s1_sum += $countones(fl_s1);
      s2_sum += $countones(fl_s2);
      fl_alloc   = (q.size() != 0) && ($urandom_range(0, 99) < read_pct);
      free_valid = (q.size() < 32) && ($urandom_range(0, 99) < read_pct + 5);
      free_reg   = REG_W'($urandom);
      @(posedge clk);
      if (fl_alloc) begin void'(q.pop_front()); reads++; end
      if (free_valid) q.push_back(free_reg);
    end
    @(negedge clk);
    fl_alloc = 0; free_valid = 0;
    $display("free list, read activity %0d%%: reads=%0d, upsized first-stage %0d.%02d of 16, second-stage %0d.%02d of 4",
             read_pct, reads, s1_sum / 400, (s1_sum % 400) / 4, s2_sum / 400, (s2_sum % 400) / 4);
  endtask

  task automatic arbiter_point(input int occ);
    int awake_sum = 0, grants = 0, settled = 0;
    for (int c = 0; c < 400; c++) begin
      logic [ENTRIES-1:0] a, b;
      int lo, hi;
      @(negedge clk);
      req = iw_full_mask;
      for (int i = 0; i < int'(ENTRIES); i++) if ($urandom_range(0, 1) == 0) req[i] = 1'b0;
      #1;
      a = '0; b = '0;
      for (int i = 0; i < int'(ENTRIES); i++)
        if (req[i]) begin
          if (a == '0) a = ENTRIES'(1) << i;
          else if (b == '0) b = ENTRIES'(1) << i;
        end
      check(grant1 == a && grant2 == b, "grants");
      check(!arb_lost, "nothing lost");
      if (a != '0) grants++;
      if (b != '0) grants++;
      if (int'(iw_count) == occ && c > 100) begin
        lo = (occ + 3) / 4;
        hi = (occ + 2 + 3) / 4 + 1;
        check($countones(arb_s1) >= lo && $countones(arb_s1) <= hi, "awake leaf cells bound");
        awake_sum += $countones(arb_s1);
        settled++;
      end
      // hold occupancy: dispatch and retire one each per cycle once there
      if (int'(iw_count) < occ)      begin iw_alloc_n = 2'd2; iw_retire_n = 2'd0; end
      else if (int'(iw_count) > occ) begin iw_alloc_n = 2'd0; iw_retire_n = 2'd2; end
      else if (occ == 0)             begin iw_alloc_n = 2'd0; iw_retire_n = 2'd0; end
      else                           begin iw_alloc_n = 2'd1; iw_retire_n = 2'd1; end
      if (int'(iw_retire_n) > int'(iw_count)) iw_retire_n = 2'(iw_count);
      @(posedge clk);
    end
    check(settled > 200, "occupancy reached and held");
    if (settled == 0) settled = 1;
    $display("arbiter, %0d entries in full area: grants=%0d, awake leaf cells %0d.%02d of 16",
             occ, grants, awake_sum / settled, (awake_sum % settled) * 100 / settled);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // seed the free list with 16 registers
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); free_valid = 1; free_reg = REG_W'(64 + i);
      @(posedge clk); q.push_back(free_reg);
    end
    @(negedge clk); free_valid = 0;
    free_list_point(0);
    free_list_point(30);
    free_list_point(60);
    free_list_point(90);
    arbiter_point(0);
    arbiter_point(6);
    arbiter_point(16);
    arbiter_point(32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
