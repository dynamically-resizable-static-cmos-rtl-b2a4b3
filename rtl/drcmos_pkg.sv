// drcmos_pkg -- constants shared by the register free list slice and the
// pick-two issue arbiter.
//
// Both structures are 64 entries deep and are built as trees of fan-in-4
// subblocks (16 first-stage cells, 4 second-stage cells, 1 root cell).
// The free list stores 9-bit physical register numbers. The entry count
// and the register width follow the original design. The fan-in of 4 is
// this implementation's choice; it matches the twelve one-hot select lines
// (three levels of four) of the 64-entry read tree.
package drcmos_pkg;
  localparam int unsigned ENTRIES  = 64;  // entries in free list / issue window
  localparam int unsigned REG_W    = 9;   // physical register number width
  localparam int unsigned FANIN    = 4;   // inputs per tree cell
  localparam int unsigned N_STAGE1 = ENTRIES / FANIN;         // 16 first-stage cells
  localparam int unsigned N_STAGE2 = N_STAGE1 / FANIN;        // 4 second-stage cells
  localparam int unsigned SEL_W    = 3 * FANIN;               // select<0:11>
endpackage
