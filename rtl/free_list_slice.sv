// free_list_slice -- one slice of a register free list: a circular FIFO of
// currently unassigned 9-bit physical register numbers, 64 entries deep.
//
// The FIFO is a 64 x 9 array (fl_sram) with a write pointer and a read
// pointer (ring_pointer, one-hot wp<0:63> and rp<0:63>). A freed register is
// written at the write pointer; an allocation reads the entry under the read
// pointer through a static 64-entry mux tree per bit (dr_mux_tree), whose
// select<0:11> lines are decoded from the read pointer. The mux tree is
// dynamically resized: only the first-stage muxes holding the entry under
// the read pointer now or next cycle (the FIFO reads circularly in order)
// are upsized; second-stage muxes follow their children; the root mux is
// not resized.
//
// Interface (this implementation's choice): `free_valid`/`free_reg` push a
// register number; `alloc` pops the head. `alloc_reg` is the head entry,
// valid whenever `empty` is low, combinational from the read pointer. A pop
// and a push may happen in the same cycle. The handshake rules are: no
// alloc when empty, no free when full (checked by assertions). Reset
// (sync, active low) empties the list; software or the tb then frees the
// initial registers into it. Timing: push and pop take effect at the next
// rising clock edge.
module free_list_slice
  import drcmos_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 free_valid,
  input  logic [REG_W-1:0]     free_reg,
  input  logic                 alloc,
  output logic [REG_W-1:0]     alloc_reg,
  output logic                 empty,
  output logic                 full,
  output logic [$clog2(ENTRIES):0] count,
  output logic [SEL_W-1:0]     select,
  output logic [N_STAGE1-1:0]  stage1_fast,
  output logic [N_STAGE2-1:0]  stage2_fast,
  output logic                 late
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [IW-1:0]      rp, wp;
  logic [ENTRIES-1:0] rp_oh, rp_next_oh, wp_oh, wp_next_oh_unused;
  logic [ENTRIES-1:0][REG_W-1:0] words;
  logic [IW:0]        count_q;
  logic               do_push, do_pop;

  assign empty   = (count_q == '0);
  assign full    = (count_q == (IW+1)'(ENTRIES));
  assign do_push = free_valid && !full;
  assign do_pop  = alloc && !empty;
  assign count   = count_q;

  ring_pointer #(.ENTRIES(ENTRIES)) u_rp (
    .clk, .rst_n, .advance(do_pop),
    .ptr(rp), .ptr_onehot(rp_oh), .next_onehot(rp_next_oh)
  );

  ring_pointer #(.ENTRIES(ENTRIES)) u_wp (
    .clk, .rst_n, .advance(do_push),
    .ptr(wp), .ptr_onehot(wp_oh), .next_onehot(wp_next_oh_unused)
  );

  fl_sram #(.ENTRIES(ENTRIES), .WIDTH(REG_W)) u_array (
    .clk, .wen(do_push ? wp_oh : '0), .wdata(free_reg), .words
  );

  always_ff @(posedge clk) begin
    if (!rst_n) count_q <= '0;
    else        count_q <= count_q + (IW+1)'(do_push) - (IW+1)'(do_pop);
  end

  // select<0:11>: one-hot per tree level from the read pointer.
  always_comb begin
    select = '0;
    select[4'(rp[1:0])]        = 1'b1;
    select[4'd4 + 4'(rp[3:2])] = 1'b1;
    select[4'd8 + 4'(rp[5:4])] = 1'b1;
  end

  dr_mux_tree #(.WIDTH(REG_W)) u_tree (
    .clk, .rst_n, .words, .select,
    .entry_wake (rp_oh | rp_next_oh),
    .dout       (alloc_reg),
    .stage1_fast, .stage2_fast, .late
  );

  // Handshake rules.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(alloc && empty))     else $error("free list: alloc while empty");
      assert (!(free_valid && full)) else $error("free list: free while full");
    end
  end
endmodule
