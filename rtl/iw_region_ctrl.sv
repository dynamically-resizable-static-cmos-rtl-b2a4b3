// iw_region_ctrl -- tracks the full and empty areas of the circular issue
// window and generates the arbiter's per-entry wake vector.
//
// The issue window is a 64-entry ring. Instructions are written at the
// write pointer (tail) when they are dispatched, and leave from the read
// pointer (head) when they retire, so the full area is the run of entries
// from head up to, but not including, tail, and both borders move
// sequentially. The arbiter treats every entry of the full area as active
// and the whole empty area as inactive.
//
// `full_mask` marks the full area. `entry_wake` is the full area plus the
// next MAX_ALLOC entries after the tail (those the next dispatch may fill),
// limited to the free entries; the arbiter registers it, so every entry
// that may request in the next cycle has its cells awake then.
//
// Interface (this implementation's choice): each cycle `alloc_n` entries
// (0..MAX_ALLOC) are dispatched and `retire_n` entries (0..MAX_RETIRE)
// retire. Rules, checked by assertions: alloc_n never exceeds the free
// entries, retire_n never exceeds the full ones, both counted at the start
// of the cycle. Reset (sync, active low)
// empties the window with both pointers at entry 0.
module iw_region_ctrl
  import drcmos_pkg::*;
#(
  parameter int unsigned MAX_ALLOC  = 2,
  parameter int unsigned MAX_RETIRE = 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(MAX_ALLOC+1)-1:0]  alloc_n,
  input  logic [$clog2(MAX_RETIRE+1)-1:0] retire_n,
  output logic [$clog2(ENTRIES)-1:0]   head,
  output logic [$clog2(ENTRIES)-1:0]   tail,
  output logic [$clog2(ENTRIES):0]     count,
  output logic [ENTRIES-1:0]           full_mask,
  output logic [ENTRIES-1:0]           entry_wake
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [IW-1:0] head_q, tail_q;
  logic [IW:0]   count_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      head_q  <= head_q + IW'(retire_n);   // 64 entries: wraps modulo 2^6
      tail_q  <= tail_q + IW'(alloc_n);
      count_q <= count_q + (IW+1)'(alloc_n) - (IW+1)'(retire_n);
    end
  end

  assign head  = head_q;
  assign tail  = tail_q;
  assign count = count_q;

  // Entry i is full when its distance from head is below count; it may be
  // filled next cycle when its distance from tail is below MAX_ALLOC and
  // below the number of free entries.
  always_comb begin
    logic [IW-1:0] dh, dt;
    for (int i = 0; i < int'(ENTRIES); i++) begin
      dh = IW'(i) - head_q;
      dt = IW'(i) - tail_q;
      full_mask[i]  = ((IW+1)'(dh) < count_q);
      entry_wake[i] = full_mask[i] ||
                      (((IW+1)'(dt) < (IW+1)'(MAX_ALLOC)) &&
                       ((IW+1)'(dt) < ((IW+1)'(ENTRIES) - count_q)));
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert ((IW+1)'(alloc_n) <= (IW+1)'(ENTRIES) - count_q)
        else $error("issue window: dispatch into a full window");
      assert ((IW+1)'(retire_n) <= count_q)
        else $error("issue window: retire from an empty window");
    end
  end
endmodule
