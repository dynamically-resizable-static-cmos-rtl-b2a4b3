// pick_two_arbiter -- 64-entry pick-two arbiter: selects up to two
// requesting issue-window entries per cycle.
//
// Two pick-one arbiters work in series. The first sees the request vector
// req<0:63> and produces grant1<0:63>. An AND gate per entry with an
// inverted grant1 input forms reqs<0:63> = req & ~grant1, the requests left
// after the first pick, which the second arbiter turns into grant2<0:63>.
// With lowest-index-first priority in each arbiter, grant1 is the lowest
// requesting entry and grant2 the next one.
//
// Both arbiters share the per-entry wake vector (the second one sees a
// subset of the first one's requests, so the same cells must be awake) and
// the root `enable`. Outputs are combinational from `req`; the wake state
// inside each arbiter is registered (see pick_one_arbiter). `lost` is the
// OR of the two arbiters' flags.
module pick_two_arbiter
  import drcmos_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ENTRIES-1:0]  req,
  input  logic                enable,
  input  logic [ENTRIES-1:0]  entry_wake,
  output logic [ENTRIES-1:0]  grant1,
  output logic [ENTRIES-1:0]  grant2,
  output logic [N_STAGE1-1:0] stage1_fast,
  output logic [N_STAGE2-1:0] stage2_fast,
  output logic                lost
);
  logic [ENTRIES-1:0]  reqs;
  logic                any_a, any_b, lost_a, lost_b;
  logic [N_STAGE1-1:0] s1_b;
  logic [N_STAGE2-1:0] s2_b;

  pick_one_arbiter u_first (
    .clk, .rst_n, .req, .enable, .entry_wake,
    .grant(grant1), .anyreq(any_a),
    .stage1_fast, .stage2_fast, .lost(lost_a)
  );

  assign reqs = req & ~grant1;

  pick_one_arbiter u_second (
    .clk, .rst_n, .req(reqs), .enable, .entry_wake,
    .grant(grant2), .anyreq(any_b),
    .stage1_fast(s1_b), .stage2_fast(s2_b), .lost(lost_b)
  );

  assign lost = lost_a | lost_b;

  // Both arbiters hold the same wake state; at most one grant per arbiter.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (s1_b == stage1_fast && s2_b == stage2_fast)
        else $error("pick_two_arbiter: wake state differs between arbiters");
      assert ($onehot0(grant1) && $onehot0(grant2) && !(|(grant1 & grant2)))
        else $error("pick_two_arbiter: grant rule broken");
    end
  end
endmodule
