# HAFT: an amorphous, defect-tolerant FPGA fabric

In a conventional island-style FPGA the split between logic and routing is
fixed when the chip is made: every tile has a logic block and a fixed share of
switch boxes, whether a given circuit needs them or not. HAFT removes that
split. The fabric is a uniform array of **ROLE** (Routing Or Logic Element)
blocks. Each one can be configured as a logic block, as a routing block, or as
a mix of both. The placer then spends routing capacity where a particular
circuit needs it. Over the array runs an **interconnect overlay** of short
(Single) and two-block (Double) segments. Segments can be chained directly
through tri-state buffers into long wires that pass ROLE blocks without
entering them.

Every configuration bit lives in a dense nano-crossbar memory stacked on the
CMOS. Such memory is cheap but many of its crosspoints are defective. The
fabric tolerates this because its basic cell, the **6-MUT**, is useful even
with a broken look-up table. A MUT whose LUT bits are bad still works as a
6-input multiplexer, and most ROLE blocks in a mapped design do routing
anyway.

This repository holds synthesizable SystemVerilog for the fabric: MUT, ROLE
block, overlay channel and a parameterised array. It also holds a
behavioural model of the defective configuration memory, and self-checking
testbenches, including a defect-rate sweep that maps a circuit around
defects.

## The 6-MUT (`rtl/mut.sv`)

```
 a b c d ──► 4-LUT ──┬──► FF ──┐
                     │         ▼
 a b c d e f ────────┴──► 8-MUX ──► g
```

The MUT has six inputs, a to f. Inputs a to d address a 16-entry truth
table. The LUT output feeds a flip-flop. An 8-input multiplexer selects `g`
from one of eight sources: the LUT, the flip-flop, or one of a to f. The
configuration (`haft_pkg::mut_cfg_t`, 19 bits) is a 3-bit select and the
16-bit table. The select codes are `SEL_LUT`=0, `SEL_FF`=1, and
`SEL_A`..`SEL_F`=2..7. Entry `lut[i]` holds the output for `i = {d,c,b,a}`.

* Logic mode: `SEL_LUT` (combinational) or `SEL_FF` (registered, one clock
  of latency).
* Routing mode: `SEL_A`..`SEL_F`. Only the three select bits matter, so this
  mode survives any number of defective LUT bits.

The flip-flop has an asynchronous active-low reset to 0. The input `en`
forces `g` to 0. It is part of the global fabric enable described below.

## The ROLE block (`rtl/role_block.sv`)

A ROLE has `N_MUT` MUTs (default 4, so a ROLE used entirely for logic is a
four-LUT logic block). A crosspoint matrix connects each of the
`N_MUT × 6` MUT inputs to a pool of wires:

| pool index p      | wire                                                  |
|-------------------|-------------------------------------------------------|
| `0 .. T-1`        | east-going wires of the row channel over the block    |
| `T .. 2T-1`       | west-going wires of the row channel                   |
| `2T .. 3T-1`      | south-going wires of the column channel               |
| `3T .. 4T-1`      | north-going wires of the column channel               |
| `4T .. 4T+N_MUT-1`| the block's own MUT outputs (feedback)                |

A MUT input is the OR of the pool wires whose crosspoints are closed. A proper
configuration closes one crosspoint per used input and leaves unused inputs
open, which then read 0. The MUTs are assigned to sides: with `N_MUT = 4`,
MUT 0 drives north, 1 east, 2 south and 3 west. Each side offers its MUT
output to every track at that edge. Whether the value actually reaches a
wire is decided by the channel's buffers.

Configuration layout, LSB first, `role_cfg_bits(N_MUT,T)` bits (460 at the
defaults):

* bits `m*19 .. m*19+18`: `mut_cfg_t` of MUT m;
* bit `N_MUT*19 + (m*6 + i)*POOL + p`: crosspoint between MUT m input i
  (0 = a … 5 = f) and pool wire p.

A ROLE with all MUTs in routing mode is a small switch box that can make
bends, fan-out and turns between the two channels. A ROLE with all MUTs in
logic mode is a logic block. Mixed use is just as legal.

## The interconnect overlay (`rtl/overlay_channel.sv`)

One channel runs along every row (east/west) and every column
(south/north). A channel over `LEN` blocks has gaps numbered `0..LEN`. Gaps
0 and `LEN` are its ends, at the pads.

```
 gap:   0          1          2          3
 pad ───┤  ROLE 0  ├  ROLE 1  ├  ROLE 2  ├─── pad
 Single: break at every gap
 Double (phase 0): break at gaps 0, 2, 3
 Double (phase 1): break at gaps 0, 1, 3
```

Each track is a chain of segments. Tracks `0..N_SINGLE-1` are Single
(one block long). The others are Double (two blocks long), with
alternating phase so Double breaks are staggered. Every segment is a pair
of unidirectional wires: *inc* runs towards higher index (east or south)
and *dec* towards lower index (west or north). At a break, each wire has
two tri-state buffers, configured per gap and track by `gap_cfg_t`:

| bit | field     | effect                                                           |
|-----|-----------|------------------------------------------------------------------|
| 3   | `byp_inc` | continue the inc wire from the segment before the gap (bypass)   |
| 2   | `drv_inc` | drive the inc wire from ROLE g-1 (its east/south output)         |
| 1   | `byp_dec` | continue the dec wire from the segment after the gap             |
| 0   | `drv_dec` | drive the dec wire from ROLE g (its west/north output)           |

At gap `LEN` the "segment after the gap" of an inc wire is the output pad
(`pad_out_hi`). At gap 0 it is the input pad (`pad_in_lo`). The dec wires
mirror this. A Double segment passes its middle gap with no buffer, and the
enables stored for that gap are ignored. Buffers are modelled as AND-OR
logic. An undriven wire reads 0. An assertion flags two enabled buffers
on one wire. The channel's configuration is `(LEN+1) × T × 4` bits, with
gap g and track t at bit `(g*T + t)*4`.

A long connection is simply `byp_*` set at every break along the way: it never
enters a ROLE's crosspoint matrix. A connection that must turn, fan out or
reach a MUT goes through a ROLE.

## Configuration memory and defects (`rtl/nano_config_mem.sv`)

This is a behavioural model of the nano-crossbar. Each instance stores the
bits of one tile, written and read back one 16-bit word at a time. All the
bits drive the fabric in parallel. The defect rate is `DEFECT_PCT`
percent. A fixed hash of `(SEED, bit index)` marks crosspoints that cannot
be closed. A defective bit always reads 0, whatever is written. Reading a
word back after writing all ones therefore shows a loader exactly which
crosspoints it must avoid.

## The array (`rtl/haft_fpga.sv`)

`ROWS × COLS` ROLE blocks (default 3 × 3), one channel per row and one per
column, each with its own configuration memory. The configuration address
is `{tile, word}`:

| tile                        | contents                        | words (defaults) |
|-----------------------------|---------------------------------|------------------|
| `r*COLS + c`                | ROLE (r,c)                      | 29               |
| `ROWS*COLS + r`             | row channel r                   | 3                |
| `ROWS*COLS + ROWS + c`      | column channel c                | 3                |

At the defaults `cfg_addr` is 9 bits: a 4-bit tile and a 5-bit word.
Writes take effect on the rising edge of `clk`, and `cfg_rdata` is
combinational.

Channel ends are brought out as pads, one per track and direction. For
rows these are `h_pad_in_w`, `h_pad_in_e`, `h_pad_out_e` and
`h_pad_out_w`. Columns have the `v_pad_*` equivalents.

**Loading.** Hold `fabric_en` low, write every word, optionally read them
back, then raise `fabric_en` and release `rst_n`. While `fabric_en` is low
every MUT output and every channel buffer is off. A random power-up or
half-written configuration can therefore neither short two buffers nor
close a ring oscillator. Once enabled, the fabric is combinational except
for the MUT flip-flops. As in any FPGA routing fabric, a structural loop
exists from a ROLE output through a channel back to a ROLE input. Lint tools
report it as a combinational loop. A valid configuration must not close it
through non-registered MUTs.

## Mapping a circuit, by example

`tb/tb_haft_fpga.sv` builds configurations by hand. Its first circuit
registers `x ^ y` in ROLE(0,1):

1. `x` enters the row-0 Single track at gap 0 (`byp_inc`). It crosses gap 1
   on a bypass buffer, passing ROLE(0,0) without entering it.
2. `y` enters Double track 1, whose first segment spans ROLE(0,0) and
   ROLE(0,1).
3. In ROLE(0,1), MUT 1 (east) closes crosspoints `a ← pool 0` and
   `b ← pool 1`. Its table is `16'h6666` (a ^ b) and its select is
   `SEL_FF`.
4. The row channel sets `drv_inc` at gap 2 and `byp_inc` at gap 3. The result
   reaches `h_pad_out_e[0][0]` one clock after the inputs.

The same testbench also maps three more circuits:

* a multiplexer-mode bend from a row channel into a column channel;
* a toggle flip-flop fed back through its own crosspoint matrix;
* a 4-input LUT fed from two channels.

## Defect tolerance in practice

`tb/haft_defect_run.sv` is a small defect-aware mapper in SystemVerilog:

1. It probes every configuration word of a 12 × 3 fabric.
2. It searches row by row for a working placement of a registered XOR. It
   relays a signal through a MUT in multiplexer mode wherever a bypass
   buffer is broken.
3. It loads the mapping and checks the circuit.

`tb/tb_haft_defects.sv` runs it at 0, 10, 20, 30, 40 and 50 % defects. Every
rate maps and computes correctly. Up to 40 % the first row suffices. At 50 %
the mapper needed six rows. This is the area cost of defects, which the
architecture absorbs by using more blocks. Some relays go through MUTs
whose LUT is defective, so the "broken LUT becomes a multiplexer" mechanism
is exercised. The circuit is a small stand-in. The benchmark circuits
themselves (MCNC, 1 000 – 8 400 4-LUTs) need a real placer and router and
fabrics of tens of blocks on a side. The RTL scales to that through `ROWS`
and `COLS`, but no such mapping is included.

## Parameters

| parameter      | default | meaning                                             |
|----------------|---------|-----------------------------------------------------|
| `ROWS`, `COLS` | 3, 3    | array size                                          |
| `N_MUT`        | 4       | MUTs per ROLE (multiple of 4; one group per side)   |
| `N_SINGLE`     | 1       | Single tracks per channel                           |
| `N_DOUBLE`     | 2       | Double tracks per channel                           |
| `DEFECT_PCT`   | 0       | percent of defective configuration crosspoints      |
| `DEFECT_SEED`  | 1       | selects the defect pattern                          |

## What follows the architecture and what is chosen here

These follow the architecture:

* the ROLE array under row and column channels;
* the MUT structure (4-LUT, flip-flop, 8-way output mux over LUT, FF and a–f);
* four LUTs per logic block;
* Single and Double segments of two unidirectional wires with tri-state
  buffers, chained directly or through ROLE blocks;
* all configuration in a defective crosspoint memory;
* the "defective LUT → multiplexer" use.

These are choices of this implementation:

* Array and track counts. The architecture gives neither a default array
  size nor a channel width.
* The full crosspoint matrix inside the ROLE, and the assignment of MUTs to
  sides.
* The select encoding and LUT bit order.
* The gap/buffer numbering and the Double staggering.
* Pads at the channel ends.
* The 16-bit configuration port with readback.
* The stuck-open defect model.
* The global `fabric_en`.
* The flip-flop reset.

Two details of the architecture are read one way here. A ROLE is described
as giving "four 4-LUTs" when used fully as logic, while the example drawing
of a ROLE shows twelve MUTs. The default is 4, and `N_MUT = 12` gives the
larger block. Each wire of a segment is described as controlled by one
tri-state buffer. Here that buffer is the bypass (`byp_*`), and a second one
(`drv_*`) lets the neighbouring ROLE drive the wire, since segments also
connect through routing blocks. The exact wiring inside the drawn ROLE and
switch points is not reproduced, only their function.

Not included: the placement and routing software (simulated annealing with a
routing-demand variance cost, and a VPR-style router), and the physical
nano/CMOS interface.

## Simulating

All files are plain SystemVerilog 2017. The package must be read first. For
example, the full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/haft_pkg.sv tb/tb_haft_fpga.sv --top-module tb_haft_fpga
./obj_dir/Vtb_haft_fpga
```

| testbench             | what it checks                                                          |
|-----------------------|-------------------------------------------------------------------------|
| `tb_mut`              | random tables/selects against a model; FF latency; enable              |
| `tb_role_block`       | random crosspoint configurations at 4 and 12 MUTs; logic, routing, hybrid use; feedback |
| `tb_overlay_channel`  | random buffer settings against a wire-walking model; long bypass wires  |
| `tb_nano_config_mem`  | exact storage when defect-free; fixed defect pattern near the set rate  |
| `tb_haft_fpga`        | load/readback and four mapped circuits on the default 3 × 3 array       |
| `tb_haft_defects`     | defect-aware mapping at 0–50 % defects                                  |

Each prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.
Verilator is two-state. The testbenches therefore initialise everything
they read, and hold `fabric_en` low until the configuration is loaded.
