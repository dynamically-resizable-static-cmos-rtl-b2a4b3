// drcmos_top -- the two dynamically resized processor blocks side by side:
// a 64-entry register free list slice and a 64-entry pick-two issue
// arbiter with the issue-window region tracking that drives its wakeups.
//
// The two halves share only clock and reset. Free list: push freed register
// numbers with free_valid/free_reg, pop the head with fl_alloc (alloc_reg is
// valid while fl_empty is low). Issue side: iw_alloc_n and iw_retire_n move
// the write and read pointers of the circular issue window; req carries the
// ready bits of the window entries (only entries in the full area may
// request); grant1/grant2 name the two selected entries in the same cycle.
// The wake state of both trees is brought out (stage*_fast) together with
// the timing-hazard flags (fl_late, arb_lost), which a correct wake
// schedule keeps low. All rules and timing are those of the sub-blocks.
module drcmos_top
  import drcmos_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // register free list slice
  input  logic                free_valid,
  input  logic [REG_W-1:0]    free_reg,
  input  logic                fl_alloc,
  output logic [REG_W-1:0]    alloc_reg,
  output logic                fl_empty,
  output logic                fl_full,
  output logic [$clog2(ENTRIES):0] fl_count,
  output logic [N_STAGE1-1:0] fl_stage1_fast,
  output logic [N_STAGE2-1:0] fl_stage2_fast,
  output logic                fl_late,
  output logic [SEL_W-1:0]    fl_select,
  // issue window and pick-two arbiter
  input  logic [1:0]          iw_alloc_n,
  input  logic [1:0]          iw_retire_n,
  input  logic [ENTRIES-1:0]  req,
  input  logic                issue_enable,
  output logic [$clog2(ENTRIES)-1:0] iw_head,
  output logic [$clog2(ENTRIES)-1:0] iw_tail,
  output logic [$clog2(ENTRIES):0]   iw_count,
  output logic [ENTRIES-1:0]  iw_full_mask,
  output logic [ENTRIES-1:0]  grant1,
  output logic [ENTRIES-1:0]  grant2,
  output logic [N_STAGE1-1:0] arb_stage1_fast,
  output logic [N_STAGE2-1:0] arb_stage2_fast,
  output logic                arb_lost
);
  logic [ENTRIES-1:0] iw_wake;

  free_list_slice u_free_list (
    .clk, .rst_n,
    .free_valid, .free_reg,
    .alloc(fl_alloc), .alloc_reg,
    .empty(fl_empty), .full(fl_full), .count(fl_count),
    .select(fl_select),
    .stage1_fast(fl_stage1_fast), .stage2_fast(fl_stage2_fast),
    .late(fl_late)
  );

  iw_region_ctrl #(.MAX_ALLOC(2), .MAX_RETIRE(2)) u_window (
    .clk, .rst_n,
    .alloc_n(iw_alloc_n), .retire_n(iw_retire_n),
    .head(iw_head), .tail(iw_tail), .count(iw_count),
    .full_mask(iw_full_mask), .entry_wake(iw_wake)
  );

  pick_two_arbiter u_arbiter (
    .clk, .rst_n, .req, .enable(issue_enable), .entry_wake(iw_wake),
    .grant1, .grant2,
    .stage1_fast(arb_stage1_fast), .stage2_fast(arb_stage2_fast),
    .lost(arb_lost)
  );
endmodule
