// pick_one_arbiter -- 64-entry pick-one arbiter built as a three-level tree
// of 4-input arbiter cells (16 leaf cells, 4 middle cells, 1 root cell).
//
// Requests flow up as `anyreq` from each cell to its parent's request
// input; grants flow down, each cell's `enable` being its parent's grant to
// it. The root cell's enable is the arbiter's `enable` input. With req0 of
// each cell as the highest priority, the granted entry is the
// lowest-numbered requesting entry, and at most one grant bit is set.
//
// Resizing: `entry_wake` marks the entries that may request in the next
// cycle. A leaf cell is asked to upsize when any of its four entries is
// marked; the request is registered, so a leaf's fast subcircuit is on one
// cycle after it is requested. A middle cell is awake when any of its four
// leaf children is (the OR of their wake signals). The root cell is always
// on the critical path and is not resized. Sleeping cells drive zero
// outputs. `lost` reports a request that reached a sleeping cell. Reset
// (sync, active low) wakes every cell. Grants are combinational from `req`.
module pick_one_arbiter
  import drcmos_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ENTRIES-1:0]  req,
  input  logic                enable,
  input  logic [ENTRIES-1:0]  entry_wake,
  output logic [ENTRIES-1:0]  grant,
  output logic                anyreq,
  output logic [N_STAGE1-1:0] stage1_fast,
  output logic [N_STAGE2-1:0] stage2_fast,
  output logic                lost
);
  logic [N_STAGE1-1:0] wake1_req, wake1_q;
  always_comb
    for (int j = 0; j < int'(N_STAGE1); j++)
      wake1_req[j] = |entry_wake[FANIN*j +: FANIN];

  always_ff @(posedge clk) begin
    if (!rst_n) wake1_q <= '1;
    else        wake1_q <= wake1_req;
  end

  always_comb
    for (int k = 0; k < int'(N_STAGE2); k++)
      stage2_fast[k] = |wake1_q[FANIN*k +: FANIN];
  assign stage1_fast = wake1_q;

  logic [N_STAGE1-1:0] any1, en1, lost1;
  logic [N_STAGE2-1:0] any2, en2, lost2;
  logic                lost_root;

  for (genvar j = 0; j < int'(N_STAGE1); j++) begin : g_leaf
    arb_cell u_cell (
      .req   (req[FANIN*j +: FANIN]),
      .enable(en1[j]),
      .wake  (wake1_q[j]),
      .grant (grant[FANIN*j +: FANIN]),
      .anyreq(any1[j]),
      .lost  (lost1[j])
    );
  end

  for (genvar k = 0; k < int'(N_STAGE2); k++) begin : g_mid
    arb_cell u_cell (
      .req   (any1[FANIN*k +: FANIN]),
      .enable(en2[k]),
      .wake  (stage2_fast[k]),
      .grant (en1[FANIN*k +: FANIN]),
      .anyreq(any2[k]),
      .lost  (lost2[k])
    );
  end

  arb_cell u_root (
    .req   (any2),
    .enable(enable),
    .wake  (1'b1),
    .grant (en2),
    .anyreq(anyreq),
    .lost  (lost_root)
  );

  assign lost = (|lost1) | (|lost2) | lost_root;
endmodule
