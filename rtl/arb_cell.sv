// arb_cell -- the 4-input cell from which the issue arbiter tree is built,
// in simplified DRCMOS form.
//
// Function: `anyreq` is the OR of the four requests and tells the parent
// cell that this subtree has a request. When the parent passes down
// `enable` (its grant to this subtree), a priority encoder grants exactly
// one of the requesting inputs; req0 has the highest priority, req3 the
// lowest (this implementation's choice, entries with lower index being
// treated as older).
//
// Resizing: when the cell is idle its outputs are all zero, so the slow
// subcircuit of the DRCMOS cell reduces to pull-downs that hold the outputs
// low while the fast subcircuit sleeps. At the logic level a sleeping cell
// (`wake` low) drives anyreq and grant to zero. `lost` flags a request that
// reaches a sleeping cell, which a correct wake schedule never allows.
// Purely combinational.
module arb_cell (
  input  logic [3:0] req,
  input  logic       enable,
  input  logic       wake,
  output logic [3:0] grant,
  output logic       anyreq,
  output logic       lost
);
  logic [3:0] prio;

  always_comb begin
    prio = '0;
    if      (req[0]) prio[0] = 1'b1;
    else if (req[1]) prio[1] = 1'b1;
    else if (req[2]) prio[2] = 1'b1;
    else if (req[3]) prio[3] = 1'b1;
  end

  assign anyreq = wake & (|req);
  assign grant  = (wake && enable) ? prio : 4'b0000;
  assign lost   = !wake && (|req);
endmodule
