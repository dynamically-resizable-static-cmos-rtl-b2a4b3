// tb_free_list_slice -- self-checking test of the register free list slice.
// A queue model of the FIFO is kept alongside. The list is filled with
// register numbers, then driven with random frees and allocations at read
// activity factors 0%, 30%, 60% and 90% (the fraction of cycles with an
// allocation), and finally emptied. Each cycle checks the head register
// (available in the same cycle, zero latency), count, empty and full; that
// no read is late (the wake schedule always has the read path upsized);
// that at most two first-stage muxes and two second-stage muxes are upsized;
// and that exactly the muxes holding the head entry and the one after it
// are upsized, one cycle after the head was there.
module tb_free_list_slice;
  import drcmos_pkg::*;
  logic clk = 0, rst_n = 0;
  logic free_valid = 0, alloc = 0;
  logic [REG_W-1:0] free_reg = '0, alloc_reg;
  logic empty, full, late;
  logic [6:0] count;
  logic [SEL_W-1:0] select;
  logic [N_STAGE1-1:0] s1;
  logic [N_STAGE2-1:0] s2;
  logic [REG_W-1:0] q[$];
  int checks = 0, failures = 0, pops = 0, fulls = 0, wraps = 0, moves = 0;
  int rp_model = 0;
  logic [N_STAGE1-1:0] want_s1;

  free_list_slice dut (.clk, .rst_n, .free_valid, .free_reg, .alloc, .alloc_reg,
                       .empty, .full, .count, .select,
                       .stage1_fast(s1), .stage2_fast(s2), .late);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0t)", what, $time); end
  endtask

  task automatic step(input int read_pct, input int free_pct);
    @(negedge clk);
    check(count == 7'(q.size()), "count");
    check(empty == (q.size() == 0), "empty");
    check(full == (q.size() == 64), "full");
    if (q.size() != 0) check(alloc_reg == q[0], "head register");
    check(!late, "no late read");
    check($countones(s1) <= 2 && $countones(s2) <= 2, "few upsized muxes");
    check(s1 == want_s1, "upsized first-stage muxes");
    check(select == 12'((1 << (rp_model % 4)) | (1 << (4 + (rp_model / 4) % 4)) | (1 << (8 + rp_model / 16))),
          "select<0:11>");
    if (full) fulls++;
    alloc      = (q.size() != 0) && ($urandom_range(0, 99) < read_pct);
    free_valid = (q.size() != 64) && ($urandom_range(0, 99) < free_pct);
    free_reg   = REG_W'($urandom);
    @(posedge clk);
    // wake requested this cycle from the current head takes effect next cycle
    want_s1 = '0;
    want_s1[rp_model / 4] = 1'b1;
    want_s1[((rp_model + 1) % 64) / 4] = 1'b1;
    if (alloc) begin
      void'(q.pop_front());
      pops++;
      if (rp_model == 63) wraps++;
      if (rp_model % 4 == 3) moves++;
      rp_model = (rp_model + 1) % 64;
    end
    if (free_valid) q.push_back(free_reg);
    #1;
    alloc = 0; free_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    want_s1 = '1;
    @(posedge clk);           // first cycle after reset: all upsized
    want_s1 = 16'h0001;       // head at 0: muxes 0 (and 0 again for entry 1)
    for (int i = 0; i < 70; i++) step(0, 100);      // fill, tries beyond full
    for (int a = 0; a < 4; a++)
      for (int i = 0; i < 300; i++) step(a * 30, 50 + a * 10);
    for (int i = 0; i < 80; i++) step(100, 0);      // drain
    check(pops > 200 && fulls > 0 && wraps >= 2 && moves > 20, "free list exercised");
    $display("free list: pops=%0d wraps=%0d group moves=%0d", pops, wraps, moves);
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
