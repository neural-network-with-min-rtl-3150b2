# MIN/MAX node networks for image recognition

A MIN/MAX node is a one-input classifier that learns a range. During training
it remembers the smallest and the largest value it has seen at its input; during
recognition it answers 1 when the input lies inside that range, both ends
included, and 0 otherwise:

    O = 1  if MIN <= I <= MAX,  else 0

A network of such nodes recognises an image by giving each node one pixel
(a grey level, or for colour one RGB "trixel"). Trained on a few examples of a
class, each node has learnt how much its pixel varies within the class. For a
new image, the network counts how many nodes accept their pixel; a similar image
gives a high count. Unlike template matching, nothing computes a distance: each
node is two comparisons against stored values.

This repository holds two networks built from this idea:

1. **The single-layer network unit** (`min_max_core`). It has U = 512 nodes, 8-bit
   input values and a 10-bit response. It keeps all node ranges in two memories
   and processes the pattern serially, one pixel at a time. This is the unit
   intended for an FPGA, and the main design here.
2. **The colour network with grouping** (`trixel_net`). Its trixel nodes are
   evaluated in parallel. They are gathered in groups, and each group sum is
   thresholded before the groups are added.

`minmax_top` places both side by side, each with its own ports.

## The single-layer unit

### Data path

```
 in_port ─► INP REG ─INDATA─┬─► MUX MAX ─MEM1IN─┬─► RAM1 MAX ──► COMPAR MAX (MEM1IN > MAX) ─┐
 (8 bit)                    │   (or 00000000)   └──────────────────►┘                      │
                            └─► MUX MIN ─MEM2IN─┬─► RAM2 MIN ──► COMPAR MIN (MEM2IN < MIN) ─┤
                                (or 11111111)   └──────────────────►┘                      ▼
 ADDR GEN ──ADDRESS (9 bit)──► both memories                       CONTROLLER ──► RESP COUNT ─► response
                                                                                  (10 bit)
```

| Unit | Module | Role |
|---|---|---|
| INP REG | `inp_reg` | Holds the current input value (INDATA). |
| MUX MAX / MUX MIN | `init_mux` | Pass INDATA, or during clearing the constants 00000000 (MAX) and 11111111 (MIN). |
| RAM1 MAX / RAM2 MIN | `node_ram` | 512 x 8 memories. Each holds one value per node. Registered read, synchronous write. |
| COMPAR MAX / COMPAR MIN | `minmax_compar` | Flag a value above the stored MAX, or below the stored MIN. |
| ADDR GEN | `addr_gen` | Node index, 0 to 511. |
| RESP COUNT | `resp_count` | Counts the nodes that accepted their value. |
| CONTROLLER | `minmax_ctrl` | Sequences everything (below). |
| clock source | `phase_gen` | Generates the three phase strobes. |

The node address is the position of the value in the pattern. Input value *i*
of a pattern therefore always meets node *i*'s stored MIN and MAX. The counter
result is the plain sum of node responses. The unit applies **no threshold**:
comparing the count with a preset value is left to whatever uses the unit.

### Three phases per value

The unit works in periods of three clock cycles. `phase_gen` marks them with
one-cycle strobes `ph1`, `ph2` and `ph3` (CLK1, CLK2 and CLK3 of the original
three-clock scheme):

| Phase | What happens |
|---|---|
| ph1 | INP REG captures `in_port`. ADDR GEN moves to the node of this value. Commands are sampled. |
| ph2 | Both memories are read at ADDRESS. |
| ph3 | The comparators decide, with the stored MIN/MAX on the memory outputs and the value on MEM1IN/MEM2IN. **Training:** RAM1 MAX is written with the value if it is above MAX, and RAM2 MIN if it is below MIN. **Recognition:** RESP COUNT counts the node if neither comparator fires. |

A pattern of 512 values takes 3 x 512 = 1536 cycles. The same holds for clearing.
The top brings `ph1` out as `sample`, so that a source knows when to present
the next value.

### Commands and handshake

All commands are sampled in a `sample` (ph1) cycle while the unit is idle, or
in the ph1 cycle in which it reports `done`:

* **clear**: sweeps all 512 addresses, one per phase period. The muxes select
  the constants, so every node gets MAX = 0 and MIN = 255. An empty node accepts
  nothing, and the first training value becomes both its MIN and its MAX.
  Clear has priority over synchr.
* **synchr**: the value on `in_port` in this cycle is value 0 of a pattern. The
  next 511 values are taken in the following 511 `sample` cycles. `train` is
  sampled here and holds for the whole pattern: 1 trains, 0 recognises. The
  response counter is cleared. It does not count during training.
* **done**: pulses for one cycle, the ph1 that follows the last value's ph3,
  1536 cycles after the command. In recognition, `response` then holds the
  final count. A new synchr in that same cycle starts the next pattern back to
  back, and the count is cleared one cycle later. Read `response` in the `done`
  cycle, or before issuing the next command.
* **busy** is high while a clear or a pattern is in progress.

The memories have no reset. Run a clear after power-up.

## The colour network with grouping

`minmax_node` is a single node with its own MIN/MAX registers, for parallel use.
A clear sets MIN = 255 and MAX = 0. Each cycle with `train` high widens the range
to take in `x`. The response is combinational. The parameter `TOL` adds a
tolerance band: the node also accepts values up to TOL below MIN and TOL above
MAX, with saturation at 0 and 255. This allows for small changes in
illumination. The default of 0 means no band.

`trixel_node` holds three nodes, for R (bits 23:16), G (15:8) and B (7:0), and
ANDs their responses. `trixel_group` sums the responses of G trixels and compares
the sum with a per-group threshold (`threshold_unit`, r = sum >= T).
`trixel_net` holds K groups and adds their 0/1 results. Grouping sharpens the
difference between the right image and other images: one bad region can cost at
most one group.

Each trixel should see one pixel of the image, picked pseudo-randomly. Covering
about a tenth of the pixels is usually enough. The choice of pixels is not part
of this RTL: `tx_pix[k][i]` is the pixel already chosen for trixel *i* of group *k*.
All nodes train together from one `tx_train` cycle. `tx_eval` registers the
response, and `tx_resp` and `tx_valid` appear one cycle later.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `N_BITS` | 8 | core, nodes | bits per input value (per colour component) |
| `U_NODES` | 512 | core | number of nodes |
| `M_BITS` | 10 | core | response width, must exceed log2(U) |
| `A_BITS` | 9 | core | address width, 2^A_BITS >= U |
| `K` | 4 | colour net | number of groups (own choice) |
| `G` | 3 | colour net | trixels per group (own choice, as drawn in the grouping scheme) |
| `TOL` | 0 | colour net | tolerance band (own choice) |

The shared defaults of the core live in `minmax_pkg`.

## How it departs from the original unit

The original single-layer unit is described at block level only. The following
points are this implementation's own choices:

* **Clocks.** The original used three clocks from a separate clock block. Here
  there is one clock and three enable strobes, which is safer on current FPGAs.
* **Phase timing.** The assignment of work to the three phases follows the
  block scheme: CLK1 at the input register and address generator, CLK3 at the
  counter. Everything else in the phase plan is this implementation's own.
* **Command protocol.** The meaning of SYNCHR (start of a pattern), the latching
  of TRAIN per pattern, and the priority of CLEAR are this implementation's
  reading of the interface.
* **busy and done.** These outputs are additions of this implementation.
* **Memories.** They are plain arrays with a registered read, which map to FPGA
  block RAM. The original used vendor library memories in the embedded array
  blocks. The two 512 x 8 memories (8192 bits) fit in four of the six
  2048-bit blocks of the original device.
* **Response counter.** It saturates at 1023, which 512 nodes never reach.
* **Colour network.** K, G, TOL, the RGB bit packing and the one-cycle
  registered output are this implementation's own choices. Pixel selection is
  left out entirely.

## Verification

Each module has a self-checking testbench in `tb/` that compares the module
against an independent model. Each one prints
`TB_RESULT checks=N failures=M` at the end.

`tb_minmax_top` runs the whole design at its default sizes. On the unit it
runs two clears (one with synchr asserted at the same time), three training
patterns, six recognition patterns, a back-to-back pattern and a check that a
cleared unit answers 0. The recognition patterns are the trained pattern, noisy
versions, the exact MIN and MAX bounds, and random data. It checks every
response against a MIN/MAX model and every pattern's 1536-cycle duration. It
then trains the colour network on two images and checks 300 evaluations with
random thresholds. It counts each mechanism and fails if one never occurs: clear
writes, MAX writes, MIN writes, counted nodes, rejected nodes, back-to-back
start, clear over synchr, and group threshold both met and missed.

Run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/minmax_pkg.sv \
          tb/tb_minmax_top.sv --top-module tb_minmax_top
./obj_dir/Vtb_minmax_top
```

Replace the testbench name to run another. Every testbench finishes in well
under a second. The RTL lints cleanly with `verilator --lint-only -Wall`,
apart from style warnings: reset used both in assertions and as an async reset,
and an unconnected group-sum output.
