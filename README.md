# Dynamically resizable static CMOS: free list and pick-two arbiter

Many busy blocks in an out-of-order core are active every cycle as a whole,
yet most of their internal paths are idle, and which paths are idle can be
known a cycle ahead. A FIFO's read mux tree only ever uses the path from the
entry under the read pointer, and that pointer moves one entry at a time. An
issue arbiter only gets requests from the occupied part of a circular window,
whose borders also move one entry at a time. *Dynamically resizable static
CMOS* (DRCMOS) uses that knowledge. Each subblock of such a tree is built
twice, in parallel:

* a **fast subcircuit** of large, low-threshold, leaky transistors, whose
  supply is switched by a *wake* signal;
* a **slow subcircuit** of small, high-threshold transistors with the same
  function. It is always powered and keeps the output value while the fast
  one sleeps.

Subblocks that will carry the critical transition next cycle are woken one
cycle early ("upsized"). All other subblocks run on their slow subcircuit
alone ("downsized"), which cuts leakage. The first tree stage is woken from
what is known about its inputs. Each later stage is awake when any of its
input subblocks is: its wake is the OR of theirs.

This RTL builds the two blocks this technique was applied to: a 64-entry
register free list slice and a 64-entry pick-two issue arbiter. It also
builds the wake control each one needs. The RTL models the logic function
and the **wake schedule**. It does not model transistors or power. Speed is
only represented by whether a subblock is in its fast state when the
selected path runs through it.

## How resizing is represented in logic

| cell | fast subcircuit | slow subcircuit | while asleep |
|---|---|---|---|
| `drcmos_mux4` (free list tree) | same 4:1 mux, active when `wake` | same 4:1 mux, always on | output still correct, only slow |
| `arb_cell` (arbiter tree) | OR + priority encoder, active when `wake` | pull-downs to zero | all outputs 0 |

Each tree registers its first-stage wake requests. A subblock asked to wake
in cycle *t* is therefore fast in cycle *t+1*. This models the cycle of
warning that a subblock needs before a critical transition reaches it.
Second-stage wakes are the OR of their children's registered wakes. The root
cell of each tree is on every path, so it is never resized.

Two check outputs show whether the wake schedule is right. A correct schedule
keeps both low, and the testbenches fail if either rises:

* `late` (free list): the selected read path passes through a mux that is
  in its slow state. Such a read would still return the correct value, but
  at slow-subcircuit speed.
* `lost` (arbiter): a request reached a sleeping cell, whose outputs are
  forced to zero. The request would never be granted.

The `stage1_fast` and `stage2_fast` outputs show which cells are upsized at
any moment. The count of downsized cells is the logic-level proxy for the
leakage saved.

## Register free list slice (`free_list_slice`)

This is a circular FIFO of unassigned 9-bit physical register numbers,
64 entries deep. A complete free list would place several slices side by side
to hand out several registers per cycle.

* `fl_sram` is the 64 x 9 array. It is written through a one-hot word-enable
  vector `wen<0:63>`, which is the write pointer gated by `free_valid`.
* `ring_pointer` (two instances) holds the read and write pointers and gives
  them in one-hot form (`rp<0:63>`, `wp<0:63>`).
* `dr_mux_tree` is the read port: per bit, 16 first-stage 4:1 muxes, 4
  second-stage muxes and a root mux. Nine bit slices share the selects. The
  twelve one-hot select lines `select<0:11>` come from the read pointer:

  | lines | level | read-pointer bits |
  |---|---|---|
  | `select<0:3>` | first stage | 1:0 |
  | `select<4:7>` | second stage | 3:2 |
  | `select<8:11>` | root | 5:4 |

  Entry *e* sits on first-stage mux *e/4*, which feeds second-stage mux
  *e/16*.

**Wake rule.** The upsized first-stage muxes are the ones that hold the
entry under the read pointer now, or the one after it. The read pointer
advances by at most one per cycle, so the next cycle's read always finds its
path upsized. At most two first-stage muxes and two second-stage muxes are
upsized at a time. Most of the time it is one of each, out of 16 and 4.

**Interface and timing.** `free_valid` / `free_reg` push a freed register.
`alloc` pops the head. `alloc_reg` is the head register, combinational from
the read pointer, and valid whenever `empty` is low. A push and a pop may
happen in the same cycle. Both take effect at the next clock edge.
Assertions check the two handshake rules: no `alloc` while `empty`, and no
`free_valid` while `full`. After reset the list is empty. The initial free
registers are pushed in by the user.

## Pick-two issue arbiter (`pick_two_arbiter`, `pick_one_arbiter`, `arb_cell`)

`arb_cell` is a 4-input node. `anyreq` is the OR of its requests and is
passed to the parent cell. When the parent grants this subtree (`enable`),
a priority encoder grants one requesting input. `pick_one_arbiter` is a
three-level tree of these cells: 16 leaves, 4 middle cells and the root. The
root's `enable` is the arbiter's enable. `pick_two_arbiter` chains two of
these trees. The second tree sees `reqs = req & ~grant1`, so it picks the
next request after the first grant. Both grants come out in the same cycle
as the requests.

**Priority.** The aim is to issue the two *oldest* ready instructions. The
tree has fixed priority: input 0 of each cell wins. So the grants go to the
two **lowest-numbered** requesting entries. In a circular window this equals
the two oldest only while the full area does not wrap past entry 63. Rotating
the priority to start at the window's read pointer is not part of this RTL.

**Wake rule.** `iw_region_ctrl` tracks the circular issue window:

* The write pointer (`tail`) advances by 0 to 2 per cycle as instructions
  are dispatched.
* The read pointer (`head`) advances by 0 to 2 per cycle as they retire.
* The full area is the run of entries from `head` up to `tail`.
* Every entry of the full area is treated as active, ready or not. The empty
  area is treated as inactive.

The wake vector is the full area plus the next two free entries after the
tail, which are the ones the next dispatch may fill. It is registered inside
each arbiter tree, so every entry that can request in cycle *t+1* has its
leaf cell awake by then. Both trees of the pick-two arbiter share the same
wake vector. Assertions check the window's rules: no dispatch beyond the free
entries and no retire beyond the occupied ones, both counted at the start of
the cycle.

## Top level (`drcmos_top`)

The top places the free list slice and the issue-window arbiter side by
side. They share only clock and reset. All ports are plain vectors:

* free list: `free_valid`, `free_reg`, `fl_alloc`, `alloc_reg`, `fl_empty`,
  `fl_full`, `fl_count`, `fl_select`, `fl_stage1_fast`, `fl_stage2_fast`,
  `fl_late`;
* issue side: `iw_alloc_n`, `iw_retire_n`, `req`, `issue_enable`, `iw_head`,
  `iw_tail`, `iw_count`, `iw_full_mask`, `grant1`, `grant2`,
  `arb_stage1_fast`, `arb_stage2_fast`, `arb_lost`.

`drcmos_pkg` holds the shared sizes: 64 entries, 9-bit registers and fan-in
4. Everything is synthesizable. The one clock edge is the rising edge of
`clk`. Every reset is synchronous and active low.

## Where this RTL departs from the original design or fills gaps

From the original design:

* the sizes: 64 entries and 9-bit register numbers;
* the FIFO-plus-mux-tree structure of the free list, with `select<0:11>`;
* the arbiter cell and the pick-two arrangement with the masking AND gate;
* the wake rules: current and next read-pointer entry, OR-ing up the tree,
  root not resized, and the full area active in the arbiter;
* zero outputs for idle arbiter cells.

Choices made here:

* **Fan-in.** The fan-in of 4 at every level, and the mapping of
  `select<0:11>` bits to tree levels.
* **Wake timing.** The wake is registered, one cycle ahead.
* **Interfaces.** The push/pop handshake, the empty/full flags and the
  counters of the free list, and the reset behaviour.
* **Priority.** Lowest index wins, in place of a true oldest-first order
  (see above).
* **Window rates.** Up to two dispatches and two retirements per window per
  cycle.
* **Storage.** The array is written as a plain register array, not an SRAM
  macro.
* **Check flags.** The `late` and `lost` outputs.

Not built:

* the sleep transistors and virtual supply rails, and the need for both NMOS
  and PMOS sleep devices to avoid a sneak leakage path through a sleeping
  fast subcircuit. These have no logic function.
* the pipelined versions of both blocks, which were only a point of
  comparison;
* the issue window's own storage and ready logic: requests are an input;
* anything about power, delay, voltage or temperature.

## Simulating

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=<n> failures=<n>` and stops, and it has a watchdog. With
Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    +libext+.sv rtl/drcmos_pkg.sv tb/tb_drcmos_top.sv --top-module tb_drcmos_top
./obj_dir/Vtb_drcmos_top
```

Replace `tb_drcmos_top` with any other testbench name to run it.

| testbench | what it exercises |
|---|---|
| `tb_ring_pointer` | pointer advance, wrap, one-hot and look-ahead decode |
| `tb_fl_sram` | one-hot writes into every entry, all words checked each cycle |
| `tb_drcmos_mux4` | mux function awake and asleep |
| `tb_dr_mux_tree` | read data, registered stage-1 wake, stage-2 OR, `late` flag |
| `tb_free_list_slice` | FIFO against a queue model at 0-90 % read activity, wake set = head and next entry, never late |
| `tb_arb_cell` | all request patterns x enable x wake |
| `tb_pick_one_arbiter` | lowest-index grant, wake state, `lost` for requests in sleeping cells |
| `tb_pick_two_arbiter` | first and second grants against a model, with and without sleeping cells |
| `tb_iw_region_ctrl` | pointers, full area, wake vector, every newly full entry woken a cycle ahead |
| `tb_drcmos_top` | both blocks together at full size (see below) |
| `tb_dr_workloads` | each evaluated operating point on its own, with the resizing it produces (see below) |

`tb_drcmos_top` runs the design at its default sizes through the operating
points the technique was evaluated at:

* free-list read activity of 0, 30, 60 and 90 %;
* window occupancies of 0, 6, 16, 32 and 64 entries, with all, half, or at
  most 16 entries ready.

It counts each mechanism and fails if one never happens:

* read-pointer wrap;
* first-stage and second-stage upsizing moving;
* free list full and free list empty;
* window wrap;
* arbiter cells sleeping and waking;
* two grants in one cycle.

It also prints the average number of upsized free-list muxes, about 1.2 of
16, and of downsized leaf arbiter cells.

`tb_dr_workloads` runs each operating point separately for 400 cycles. For
every point it checks all reads and grants against a model. It also bounds
the number of upsized cells: at most 2 of 16 first-stage muxes in the free
list, and for the arbiter between the leaves covering the full area and
those covering the full area plus the two next dispatch slots. Typical
averages it reports:

| operating point | upsized first-stage cells (of 16) |
|---|---|
| free list, read activity 0 % | 1.00 |
| free list, read activity 30 % | 1.23 |
| free list, read activity 60 % | 1.28 |
| free list, read activity 90 % | 1.25 |
| arbiter, 0 entries in the full area | 1.00 |
| arbiter, 6 entries | 2.75 |
| arbiter, 16 entries | 5.24 |
| arbiter, 32 entries | 9.24 |

The free-list trees keep about 15 of 16 first-stage muxes small at any read
rate. The arbiter's savings shrink as the window fills, which matches the
trend the technique was evaluated to show.
