# A multiplexer-based FPGA fabric in SystemVerilog

This is a register-transfer model of a small FPGA in which every logic cell
is built from multiplexers. The target was a current-mode-logic (CML) SiGe
BiCMOS process running at 5-10 GHz. In that kind of logic a multiplexer is the
cheapest and fastest gate there is. So one 2:1 multiplexer serves as the
cell's logic function, and the routing is done by multiplexers that feed it.
Three ideas shape the design:

* **Few switches on the signal path.** A signal crosses one input
  multiplexer and the core 2:1 multiplexer, then goes straight to the
  neighbour cells. There is no output multiplexer and no interconnect switch.
* **More routing per cell.** On each side a cell sends three signals: its
  combinational result, its sequential result and a *redirected* signal
  passed on from another neighbour. Every row and column also has shared
  *FastLANE* buses.
* **Power that follows the application.** Each multiplexer can be switched
  off completely from the configuration. Unused cells, latches and
  clock-tree branches draw nothing. The whole array can be muted with a
  master key.

The default configuration is the 20 x 20 gate-array chip: 400 cells, a
serial configuration chain, an H-pattern clock tree with gated drivers, and
a choice between an on-chip VCO and an external clock. Beside it sits a
separate test circuit, four 4-stage FPGA ring oscillators with
divide-by-eight outputs, which was used to measure the gate delay.

## The logic cell (CLB)

```
           16:1 (X1) ─────────┐
  west 17:1 (X3) ──► 0 ┐      ▼
                       2:1 core ──► FZ ──► output drivers N/E/S/W
  east 17:1 (X2) ──► 1 ┘        │
                                └─► MS-latch ──► SZ ──► output drivers
                                        └──────► FD (feedback to both 17:1)
  four 9:1 redirection muxes ──► RN, RE, RS, RW (one per side)
```

* **Inputs.** On each side a cell receives four signals from its
  neighbour's side: FZ, SZ, the redirection signal the neighbour sends
  toward it (RD), and the FastLANE running along that side (FL). That makes
  16 inputs. The two 17:1 multiplexers also see the latch feedback FD.
* **Core.** `FZ = X1 ? X2 : X3`. Each of X1, X2 and X3 has a polarity bit,
  because complements are free in differential logic. With that, one 2:1
  mux gives any function of two inputs:

  | function | X1 | X2 | X3 |
  |----------|----|----|----|
  | NOT A    | –  | ~A | ~A |
  | A AND B  | A  | B  | A  |
  | A XOR B  | A  | ~B | B  |

* **Two-level input multiplexers.** The 16:1 and 17:1 muxes are split into
  a first-level 4:1 mux per side and a second-level 4:1 (or 5:1, with FD)
  mux, as in a single-level mux with less loading. Only the first-level mux
  on the selected side is switched on. The building block, `sel_mux`,
  models the fabric's single-level current-tree multiplexer: a decoder
  turns on exactly one input branch, or none.
* **Redirection.** Each 9:1 mux passes the FZ, SZ or RD of one of the
  *other three* sides on to the side it faces. A signal never goes back the
  way it came, and FastLANEs are not redirected. So one cell can route its
  own result east and, at the same time, pass a signal from its west
  neighbour east too.
* **MS-latch.** This is the only clocked element of a cell. It is written
  as a rising-edge flip-flop. Feeding FD back gives hold and toggle
  circuits without using a neighbour.

### Configuration word (41 bits per cell, `fpga_pkg::cfg_t`)

| bits  | field      | meaning |
|-------|------------|---------|
| 40:39 | `fl_drv`   | [1] drive FZ onto the FastLANE on the north side, [0] onto the west side |
| 38:35 | `drv_en`   | output driver enable per side (index N=0, E=1, S=2, W=3), drives FZ and SZ |
| 34    | `latch_on` | MS-latch powered; also requests the clock |
| 33    | `core_on`  | core mux and input muxes powered |
| 32:29 | `redir_w`  | 9:1 mux facing west |
| 28:25 | `redir_s`  | facing south |
| 24:21 | `redir_e`  | facing east |
| 20:17 | `redir_n`  | facing north |
| 16:14 | `inv`      | complement X1, X2, X3 |
| 13:10 | `sel_x1`   | 16:1 select: side*4 + member |
| 9:5   | `sel_x2`   | east 17:1: 0 off, 1..16 = side*4 + member + 1, 17 = FD |
| 4:0   | `sel_x3`   | west 17:1, same code |

`member` is FZ=0, SZ=1, RD=2, FL=3. A redirection code is
`1 + slot*3 + member` (members FZ, SZ, RD only). `slot` numbers the three
other sides in N, E, S, W order. Code 0 switches a redirection mux off.

An all-zero word is a muted cell. Reset therefore leaves the whole array
off. The configuration registers, the MS-latches and the dividers also
power up at zero. Without that, a random start-up configuration could close
combinational loops through the fabric before reset arrives. Anything that is switched off outputs 0.

The 41-bit total and the mux sizes are the original design's. The order of
the fields, the codes and the use of the bits left after the selects
(driver enables, FastLANE drive) are this model's own.

### Operating modes

`clb.mode` reports what a loaded configuration uses:

* mute: nothing on;
* normal: core only;
* sequential: core and latch;
* FastLANE: all core inputs from FastLANEs;
* redirection: redirection muxes only;
* full: core, latch and redirection.

This mirrors the power-mode table of the original design. The source's
table lists the latch as on in normal mode, while its prose turns it off;
the prose is followed here.

## Configuration memory and chain

Each cell has a 41-bit shift register and two 41-bit memory banks
(`cfg_memory`).

* **Shifting.** Data shifts in at bit 0 on every rising `cfg_clk` and
  leaves at bit 40 into the next cell.
* **Bank writes.** While `bank_en[k]` is high at a clock edge, bank k
  copies the shift register as it was before that edge.
* **Personalities.** `mem_sel` picks the bank that configures the cells.
  Two applications can be loaded and switched between in one cycle.

In the array all shift registers form one chain from `cfg_sdi` to
`cfg_sdo`. The chain snakes through the rows: row 0 left to right, row 1
right to left, and so on. Loading takes 41 x ROWS x COLS = 16,400 clocks for
20 x 20. `cfg_sdo` lets the previous contents be read back while new ones
are shifted in.

To load, shift the word of the last cell in the chain first, MSB first, then
pulse one `bank_en` bit for one clock. That clock also shifts the chain
once more, which matters only for readback (see `tb/tb_fpga_top.sv`).

## Routing fabric (`fpga_array`)

* **Neighbours.** A cell's side inputs are its neighbour's FZ/SZ and the
  neighbour's redirection toward it. Edge cells use the `ext_in_*` ports and
  drive the `ext_out_*` ports. Each port is a `side_out_t {rd, sz, fz}` per
  row or column.
* **FastLANE.** A horizontal channel runs between every two rows, including
  above row 0 and below the last row. A vertical channel runs between every
  two columns. Each channel is cut into segments of four cells
  (`fastlane_seg`).
  * A cell reads the segments on its four sides.
  * A cell may drive the segment on its north side and the one on its west
    side.
  * The south-most and east-most channels have no cell drivers. They are
    driven from `fl_ext_s` and `fl_ext_e`.
  * A segment carries the OR of its drivers. `fl_conflict` flags a
    configuration that enables more than one driver on a segment.
* **Combinational loops.** Paths between cells are combinational and pass
  through cell multiplexers. The netlist is therefore full of *structural*
  loops, which Verilator reports as UNOPTFLAT. A configuration only closes
  the loops it asks for. Do not configure a loop without a latch in it: a
  zero-delay simulator cannot settle it.

## Clock distribution (`clock_htree`)

The system clock reaches the cells through an H-pattern binary tree of
drivers. Each driver has an enable: the OR of the clock requests of all
cells below it. A cell whose latch is on therefore turns on every driver
between itself and the clock source, and every other branch stays off. All
leaves are the same number of stages from the root.

A level-1 driver serves two vertically adjacent cells, and a level-2 driver
serves a 2 x 2 group. Cell (r, c) is the leaf whose index interleaves the
bits of r and c, with r in the lowest bit. The tree is padded to a
power-of-two square: 32 x 32, 10 levels, for 20 x 20.

`clk_drv_on` shows every driver's enable in heap order (root = bit 1). The
gating is a plain AND of the clock with a static enable. It assumes the
configuration does not change while the clock runs.

## Chip top (`fpga_top`)

`clk_select` picks `ext_clk` (`clk_sel = 1`) or `vco_clk`. The VCO itself
is analog and enters as a port, and the pads are plain ports. The
`master_key` input mutes all 400 cells at once.

The ring-oscillator test circuit (`ro_testchip`) sits beside the array with
its own ports:

* four rings of 4 cells: two with 100 ps per cell, two low-power with
  250 ps per cell;
* each ring oscillates at 1/(2·N·T): an 800 ps or 2000 ps period;
* each ring is followed by a `freq_divider` (divide by 8).

`ring_osc` is a delay-based behavioural model and is not synthesizable; the
rest of the top is. Its delays are in the simulator's time unit, meant as
picoseconds.

## Example applications

All of these are exercised by the testbenches:

* **Clock divider.** Set X2 = X3 = FD, both complemented, with the latch
  on. SZ toggles on every clock, giving f/2.
* **Demultiplexer sampling cell.**
  * X1 = SEL, X2 = DATA, X3 = FD, latch on.
  * When SEL is high, DATA is latched; otherwise the feedback holds it.
  * Sixteen such cells, with a rotating one-hot SEL from a 4-bit barrel
    counter, make a 1:16 demultiplexer.
  * In the test, DATA comes over a FastLANE and the counter is driven by
    the testbench.
* **Routing through a busy cell.**
  * Cell C5 (row 1, column 0) and cell C6 (row 1, column 1) both have a
    result needed by C7 (row 1, column 2).
  * C6 sends its own FZ east and, through its east redirection mux, also
    passes C5's result east.
  * C7 combines the two.

## Files

* `rtl/fpga_pkg.sv`: types (`cfg_t`, `side_in_t`, `side_out_t`, `mode_e`),
  select codes, mode classification, clock-tree leaf mapping.
* `rtl/sel_mux.sv`, `input_mux.sv`, `redir_mux.sv`, `ms_latch.sv`,
  `clb.sv`: the cell datapath.
* `rtl/cfg_memory.sv`, `basic_cell.sv`: configuration memory, and the cell
  with its memory.
* `rtl/fastlane_seg.sv`, `clock_htree.sv`, `fpga_array.sv`: the fabric.
* `rtl/clk_select.sv`, `fpga_top.sv`: the chip.
* `rtl/ring_osc.sv` (behavioural model), `freq_divider.sv`,
  `ro_testchip.sv`: the test circuit.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
  * `tb/fpga_tb_pkg.sv` builds configuration words from the codes above.
  * `tb/tb_fpga_top_small.sv` runs the end-to-end test at 6 x 12.
  * `tb/tb_fpga_top.sv` runs the same test at the full 20 x 20 with default
    parameters.
  * Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/fpga_pkg.sv tb/fpga_tb_pkg.sv tb/tb_clb.sv --top-module tb_clb
./obj_dir/Vtb_clb
```

Replace `tb_clb` with any testbench. Verilator finds the other modules
through `-Irtl`.

The full-size chip test builds in several minutes (pass `-j` to speed up the
C++ compile) and runs in about half a minute. It loads two personalities
(32,800 configuration clocks) and then checks:

* routing through redirection and FastLANE;
* the divider on both clock sources;
* the 16-channel demultiplexer;
* clock-tree gating;
* the switch between personalities;
* master-key mute;
* readback;
* the ring oscillators.

## How far to trust it, and where it departs from the original

These parts follow the original design's description:

* the cell structure and its mux sizes;
* the 41-bit, two-bank, serially loaded configuration;
* the FastLANE spanning four cells;
* the gated H-pattern clock tree;
* the VCO/external clock select;
* the 20 x 20 size;
* the ring-oscillator delays.

These are this model's own choices, because the description does not give
them:

* the bit layout and select codes of the configuration word;
* which 17:1 mux drives which core input;
* output-driver and FastLANE-drive bits;
* FastLANE channel placement and who may drive it;
* the snake order of the chain;
* edge-of-array ports;
* reset behaviour, and 0 as the value of a switched-off part.

Some things are not modelled at all:

* the current-mode circuits themselves;
* power, speed and current-tree counts;
* the VCO, the pads, a separate CML ring oscillator and the divide-by-two
  circuit of the test chip.

The 48 x 48 array named as a future goal can be instantiated through the
`ROWS`/`COLS` parameters but has not been simulated.
