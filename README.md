# GDI configurable register: a register-level model

An FPGA logic block needs a storage element that can be configured, per site,
as a transparent latch, an edge-triggered register, or a register with a
synchronous or asynchronous reset. The usual transistor-level implementation is
a transmission-gate master-slave flip-flop with a separate control decoder
in front of it, and it costs close to a hundred transistors. This design builds
the same configurable register from **gate-diffusion-input (GDI) cells**,
with no control decoder. Three static configuration bits steer a handful of
GDI multiplexers directly. The published circuit uses 35 transistors in its
final ("improved") form.

This repository models that circuit at the logic level in SystemVerilog, cell
by cell. Every node carries its logic value plus a flag that says whether the
level is full-swing or degraded. Degraded levels are the central weakness of
GDI logic, and removing them is the purpose of the improved circuit, so the
model makes them visible.

## The GDI cell is a 2:1 multiplexer

A GDI cell looks like a CMOS inverter whose two source terminals are inputs
instead of supply rails. One pMOS and one nMOS share the gate input G. The pMOS
connects input P to the output while G = 0, and the nMOS connects input N
while G = 1:

    OUT = G ? N : P

A single pass transistor does not pass both levels cleanly. An nMOS passes a
good 0 but only a degraded 1 (one threshold below the supply). A pMOS passes a
good 1 but a degraded 0. So a bare GDI cell gives a **weak 1** when G = 1 and
N = 1, and a **weak 0** when G = 0 and P = 0. Chains of such cells pile up
these losses.

In the model (`gdi_pkg::gsig_t`) every node is `{v, full}`:

- A level keeps `full = 1` only if every pass device it went through passed it
  cleanly.
- An input or supply-tied level is full.
- The gate input of a cell is used as a logic value only. A degraded level on
  a gate is assumed still to switch the transistors.

## One netlist, four modes

The register is eight GDI cells. Two of them, the master and the slave, feed
their outputs back to one of their own inputs and so store a bit. `'` marks a
complement.

| cell   | G    | P            | N        | output | role |
|--------|------|--------------|----------|--------|------|
| sel    | Y    | CLK          | CLK'     | s      | slave clock: CLK' in latch mode, CLK otherwise |
| master | CLK  | m (feedback) | D        | m      | follows D while CLK = 1 |
| slave  | s    | m            | q (feedback) | q  | follows m while s = 0 |
| xc     | CLK' | X            | 0        | a      | a = CLK ? X : 0 |
| zc     | Z    | a            | X        | b      | b = Z ? X : a (async or clock-gated X) |
| yc     | Y    | b            | 0        | x      | x = 0 in latch mode |
| rc     | x    | 0            | R        | r      | r = x and R: the overwrite enable |
| out    | r    | q            | 0        | Q      | Q = r ? 0 : q |

The three configuration bits select the mode:

| Y | Z | R | mode | behaviour of Q |
|---|---|---|------|----------------|
| 1 | – | – | latch | follows D while CLK = 1, holds while CLK = 0 |
| 0 | – | 0 | register | takes D at the **falling** edge of CLK |
| 0 | 0 | 1 | synchronous overwrite | register, but Q = 0 while X = 1 **and** CLK = 1 |
| 0 | 1 | 1 | asynchronous overwrite | register, but Q = 0 while X = 1, whatever CLK does |

**How the mode bits do it.**

- *Latch vs. register.* In latch mode the slave's gate is CLK', so while
  CLK = 1 both stages are transparent and D runs straight through to Q. While
  CLK = 0 both stages hold. In the register modes the slave's gate is CLK. The
  slave is then transparent only while CLK = 0, and it copies whatever the
  master held when CLK fell. That makes a negative-edge master-slave
  flip-flop.
- *The overwrite path.* The path xc → zc → yc → rc → out gates X with the
  clock (Z = 0) or lets it through directly (Z = 1). It blocks X entirely in
  latch mode (Y = 1) and enables it only with R = 1. When it is active, the
  output cell selects its N input, which is tied to 0.

**What "overwrite" means here.** This is the least obvious part of the
design. The overwrite acts on the **output cell**, not on the stored bit.

- While X holds Q at 0, the master-slave pair keeps running normally and goes
  on capturing D.
- When X is released, Q shows the current content of the slave at once. The
  output does not stay 0 until the next clock edge, as it would in a
  conventional reset flip-flop.
- In the synchronous mode X acts only while CLK = 1. This is the half-period
  in which the master is open and the slave is closed.

The model reproduces exactly this behaviour. If you need a reset that clears
the stored state, note that this circuit does not provide one.

## The improved circuit: pairs instead of single cells

To remove the weak levels, each cell is doubled into a transmission gate:

- **Full pair** (`gdi_tgl`, `FULL = 1`). A second GDI cell takes the
  complementary gate G'. Its P and N inputs are swapped, so its pMOS sits
  across the first cell's nMOS and its nMOS across the first cell's pMOS.
  Both branches then pass both levels cleanly (2 pMOS + 2 nMOS).
- **Reduced pair** (`gdi_tgl`, `FULL = 0`). This is for cells whose N input
  is tied to 0. An nMOS always passes 0 cleanly, so only the P branch needs
  help: one extra nMOS gated by G' (1 pMOS + 2 nMOS).

In the improved register:

- **Full pairs:** sel, master, slave, zc and rc.
- **Reduced pairs:** xc, yc and out, the three cells whose N is tied to 0.
- **Inverters:** three restoring inverters produce s', x' and r' for the
  internally generated gates.

The complements CLK', Y' and Z' are taken as coming from outside the cell.

| build | cells | transistors |
|-------|-------|-------------|
| plain (`IMPROVED = 0`) | 8 bare GDI cells | 8 pMOS + 8 nMOS = 16 |
| improved (`IMPROVED = 1`, default) | 5 full pairs, 3 reduced pairs, 3 inverters | 16 pMOS + 19 nMOS = 35 |

The function `gdi_pkg::reg_pmos` / `reg_nmos` computes the tally, and the
testbenches check it.

**Effect on the model.**

- In the plain build, with no overwrite active, Q is *always* degraded. A 1
  enters the master through an nMOS and so arrives weak. A 0 leaves through
  the output cell's pMOS and so also arrives weak. Only the overwrite's 0,
  which goes through an nMOS, is a clean level. `q_strong` therefore equals
  "overwrite active".
- In the improved build, `q_strong` is always 1.

## Modules

| file | contents |
|------|----------|
| `rtl/gdi_pkg.sv` | `gsig_t` (value + full-swing flag), cell kinds, pass-device strength rules, transistor tally |
| `rtl/gdi_cell.sv` | bare GDI cell, combinational |
| `rtl/gdi_tgl.sv` | improved GDI block: two `gdi_cell`s as a full pair, or one cell plus an nMOS |
| `rtl/gdi_store.sv` | a cell with its output fed back: the master (`FB_ON_N = 0`, transparent while G = 1) or slave (`FB_ON_N = 1`, transparent while G = 0) storage node |
| `rtl/gdi_config_reg.sv` | the register, top level |

Ports of `gdi_config_reg`. All are 1-bit levels. Y, Z and R are meant to be
static configuration bits.

| port | dir | meaning |
|------|-----|---------|
| `clk` | in | clock |
| `d` | in | data |
| `x` | in | overwrite input, active high, forces Q to 0 |
| `y` | in | 1 = latch mode, 0 = register modes |
| `z` | in | 1 = asynchronous overwrite, 0 = synchronous |
| `r` | in | 1 = overwrite enabled |
| `q` | out | output Q |
| `q_strong` | out | 1 when Q is a full-swing level |

Parameter `IMPROVED` (bit, default 1) selects the improved or plain build.

**Storage modelling.** The two storage nodes are written as `always_latch`
rather than as a combinational loop through a cell instance. This gives every
tool a proper storage element. Synthesis therefore reports latches: that is
the circuit, not an accident. The storage nodes have no reset. They are loaded
through D: put the register in latch mode with CLK high, or clock it once in
a register mode.

## Simulating

The model has no delays. Every output follows its inputs in the same time
step, and the only timing is the clock phases. Each testbench checks itself
and prints `TB_RESULT checks=N failures=M`.

    verilator --binary --timing -Irtl \
        rtl/gdi_pkg.sv rtl/gdi_cell.sv rtl/gdi_tgl.sv rtl/gdi_store.sv \
        rtl/gdi_config_reg.sv tb/tb_gdi_config_reg.sv --top-module tb_gdi_config_reg
    ./obj_dir/Vtb_gdi_config_reg

Add `-Wno-fatal` if your Verilator version stops on lint warnings. The
testbenches are:

| testbench | what it checks |
|-----------|----------------|
| `tb_gdi_cell` | all 32 input/strength combinations of a bare cell against the pass-transistor rule |
| `tb_gdi_tgl` | all combinations for a full and a reduced pair; both levels full-swing where the pair is complete |
| `tb_gdi_config_reg` | default (improved) build, end to end (see below) |
| `tb_gdi_config_reg_plain` | same sequence on the plain build; logic identical, `q_strong` must equal "overwrite active", weak outputs must occur |

The register testbenches work as follows:

- They drive CLK, D and X one change at a time, with random choices
  (`$urandom`).
- After every change they compare Q with a behavioural reference. That
  reference is written from the mode table, not from the cell netlist.
- They walk all four modes twice in different orders, including don't-care
  settings of Z and R.
- They count every mechanism: latch transparency, latch hold, falling-edge
  capture, no capture at the rising edge, synchronous overwrite,
  synchronous overwrite held off while CLK is low, asynchronous overwrite
  while CLK is low, and mode switches. Any mechanism that never happened
  fails the test.

Each run takes milliseconds.

## Departures and limits

- **No timing or power.** The published results are transistor-level delays
  (tens of picoseconds per mode) and power figures. A zero-delay logic model
  reproduces neither. The strength flag is a qualitative stand-in for signal
  quality only.
- **X polarity and overwrite semantics** (active high, forces 0, output only,
  clock-gated in the synchronous mode) follow from the cell connections of the
  full circuit. The simplified per-mode drawings of the published circuit show
  the overwrite as a plain `Q = X ? 0 : q`, without the clock gating. The full
  circuit's connections were followed here.
- **Which three cells are reduced pairs** is inferred from the transistor tally
  and from the rule that a cell with N tied to 0 needs no help on its N branch.
  The rc cell (P tied to 0, N = R) is kept as a full pair.
- **Complementary inputs** CLK', Y' and Z' are generated inside the model as
  ideal inversions. In the circuit they are supplied from outside.
- **Not included:** the earlier transmission-gate configurable register with
  its control decoder, and its capture, write-back and global-initialisation
  functions. They serve only as the point of comparison; the GDI design
  replaces them.
