// dr_mux_tree -- the 64-entry read mux tree of the register free list slice,
// with dynamic resizing (DR) of its subblocks.
//
// Structure: per bit, 16 first-stage 4:1 muxes, 4 second-stage 4:1 muxes
// and one root 4:1 mux (64 = 4 x 4 x 4). The twelve one-hot select lines
// select<0:11> are split as select<0:3> for the first stage (entry index
// bits 1:0), select<4:7> for the second stage (bits 3:2) and select<8:11>
// for the root (bits 5:4). Entry e therefore sits on first-stage mux e/4,
// input e%4, whose output is input (e/4)%4 of second-stage mux e/16.
//
// Resizing: `entry_wake` marks the entries that may be read in the next
// cycle (the free list drives the entries under the read pointer now and
// one step ahead). A first-stage mux is asked to upsize when any of its
// four entries is marked. That request is registered: the fast subcircuit
// of a mux is on in the cycle after it is requested, which models the cycle
// the design allows for waking a subblock before a critical transition
// reaches it. A second-stage mux is upsized whenever any of its four
// children is (the OR of their wake signals). The root mux is always on the
// critical path and is never resized.
//
// `late` is high when the selected path runs through a mux whose fast
// subcircuit is off, i.e. a read that would only propagate at the slow
// subcircuit's speed; a correct wake schedule keeps it low. Reset (sync,
// active low) puts every mux in the fast state.
module dr_mux_tree
  import drcmos_pkg::*;
#(
  parameter int unsigned WIDTH = 9
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [ENTRIES-1:0][WIDTH-1:0] words,
  input  logic [SEL_W-1:0]              select,
  input  logic [ENTRIES-1:0]            entry_wake,
  output logic [WIDTH-1:0]              dout,
  output logic [N_STAGE1-1:0]           stage1_fast,
  output logic [N_STAGE2-1:0]           stage2_fast,
  output logic                          late
);
  logic [3:0] sel_lo, sel_mid, sel_root;
  assign sel_lo   = select[3:0];
  assign sel_mid  = select[7:4];
  assign sel_root = select[11:8];

  // Registered wake requests of the first-stage muxes.
  logic [N_STAGE1-1:0] wake1_req, wake1_q;
  always_comb
    for (int j = 0; j < int'(N_STAGE1); j++)
      wake1_req[j] = |entry_wake[FANIN*j +: FANIN];

  always_ff @(posedge clk) begin
    if (!rst_n) wake1_q <= '1;
    else        wake1_q <= wake1_req;
  end

  // Second stage wakes when any child is awake.
  logic [N_STAGE2-1:0] wake2;
  always_comb
    for (int k = 0; k < int'(N_STAGE2); k++)
      wake2[k] = |wake1_q[FANIN*k +: FANIN];

  assign stage1_fast = wake1_q;
  assign stage2_fast = wake2;

  logic [N_STAGE1-1:0][WIDTH-1:0] y1;
  logic [N_STAGE2-1:0][WIDTH-1:0] y2;

  for (genvar j = 0; j < int'(N_STAGE1); j++) begin : g_stage1
    drcmos_mux4 #(.WIDTH(WIDTH)) u_mux (
      .d      (words[FANIN*j +: FANIN]),
      .sel    (sel_lo),
      .wake   (wake1_q[j]),
      .y      (y1[j])
    );
  end

  for (genvar k = 0; k < int'(N_STAGE2); k++) begin : g_stage2
    drcmos_mux4 #(.WIDTH(WIDTH)) u_mux (
      .d      (y1[FANIN*k +: FANIN]),
      .sel    (sel_mid),
      .wake   (wake2[k]),
      .y      (y2[k])
    );
  end

  // Root mux: plain static logic, never resized.
  always_comb begin
    dout = '0;
    for (int k = 0; k < int'(N_STAGE2); k++)
      if (sel_root[k]) dout |= y2[k];
  end

  // A read through a sleeping mux on the selected path is late.
  always_comb begin
    late = 1'b0;
    for (int k = 0; k < int'(N_STAGE2); k++) begin
      if (sel_root[k] && !stage2_fast[k]) late = 1'b1;
      for (int m = 0; m < int'(FANIN); m++)
        if (sel_root[k] && sel_mid[m] && !stage1_fast[FANIN*k + m]) late = 1'b1;
    end
  end
endmodule
