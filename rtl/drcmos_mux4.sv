// drcmos_mux4 -- one 4:1 mux subblock of the free-list read tree, built as a
// dynamically resizable static CMOS (DRCMOS) cell.
//
// A DRCMOS cell places two subcircuits with the same logic function in
// parallel between its inputs and its output: a fast subcircuit (large, low
// threshold, leaky) whose supply is switched by the cell's wake signal, and
// a slow subcircuit (small, high threshold) that is always powered and keeps
// the output at its value while the fast one sleeps. At the logic level the
// output is the common value of the two: the fast path contributes only when
// awake, the slow path always, and the output is their wired combination.
// What the wake signal changes is speed, which the enclosing tree checks
// against the path it selects (see dr_mux_tree).
//
// The mux is one-hot: `sel` has at most one bit set and an all-zero select
// gives an all-zero output. WIDTH copies share select and wake (the nine
// bit slices of the free list). Purely combinational.
module drcmos_mux4 #(
  parameter int unsigned WIDTH = 9
) (
  input  logic [3:0][WIDTH-1:0] d,
  input  logic [3:0]            sel,
  input  logic                  wake,
  output logic [WIDTH-1:0]      y
);
  logic [WIDTH-1:0] y_fast, y_slow;

  // Fast subcircuit: powered only while the cell is awake.
  always_comb begin
    y_fast = '0;
    if (wake)
      for (int i = 0; i < 4; i++)
        if (sel[i]) y_fast |= d[i];
  end

  // Slow subcircuit: always powered, same function.
  always_comb begin
    y_slow = '0;
    for (int i = 0; i < 4; i++)
      if (sel[i]) y_slow |= d[i];
  end

  assign y = y_fast | y_slow;
endmodule
