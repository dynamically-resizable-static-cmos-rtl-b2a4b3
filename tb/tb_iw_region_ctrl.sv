// tb_iw_region_ctrl -- self-checking test of the issue-window region
// tracker. Random legal dispatch (0..2) and retire (0..2) counts are applied
// for many wraps of the ring while a model keeps head, tail and occupancy.
// Each cycle checks the pointers, the count, the full-area mask (entries
// from head up to tail) and the wake vector (full area plus up to two free
// entries after the tail), and that every entry full in the next cycle was
// marked for wakeup in this one.
module tb_iw_region_ctrl;
  import drcmos_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] alloc_n = '0, retire_n = '0;
  logic [5:0] head, tail;
  logic [6:0] count;
  logic [ENTRIES-1:0] full_mask, entry_wake, prev_wake;
  int checks = 0, failures = 0, mh = 0, mt = 0, mc = 0, fulls = 0, empties = 0;

  iw_region_ctrl #(.MAX_ALLOC(2), .MAX_RETIRE(2)) dut (.clk, .rst_n, .alloc_n, .retire_n,
    .head, .tail, .count, .full_mask, .entry_wake);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s head=%0d tail=%0d count=%0d", what, head, tail, count); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev_wake = '1;
    for (int c = 0; c < 2000; c++) begin
      logic [ENTRIES-1:0] fm, wk;
      int phase;
      @(negedge clk);
      fm = '0; wk = '0;
      for (int d = 0; d < mc; d++) fm[(mh + d) % 64] = 1'b1;
      wk = fm;
      for (int d = 0; d < 2 && d < 64 - mc; d++) wk[(mt + d) % 64] = 1'b1;
      check(head == 6'(mh) && tail == 6'(mt) && count == 7'(mc), "pointers and count");
      check(full_mask == fm, "full mask");
      check(entry_wake == wk, "wake vector");
      check((full_mask & ~prev_wake) == '0, "full entries were woken a cycle ahead");
      if (mc == 64) fulls++;
      if (mc == 0) empties++;
      phase = (c / 250) % 4;   // alternate filling and draining phases
      alloc_n  = 2'($urandom_range(0, phase == 1 ? 1 : 2));
      retire_n = 2'($urandom_range(0, phase == 0 ? 1 : 2));
      if (phase == 2) retire_n = 2'($urandom_range(0, 2));
      if (int'(alloc_n) > 64 - mc) alloc_n = 2'(64 - mc);
      if (int'(retire_n) > mc) retire_n = 2'(mc);
      prev_wake = entry_wake;
      @(posedge clk);
      mh = (mh + retire_n) % 64;
      mt = (mt + alloc_n) % 64;
      mc = mc + alloc_n - retire_n;
    end
    check(fulls > 0 && empties > 0, "window reached full and empty");
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
