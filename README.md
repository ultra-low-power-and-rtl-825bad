# Multimode line encoder for DSRC transponders

Dedicated short range communication (DSRC) links between vehicles and roadside
units send their data in a dc-balanced line code. The standards use three:
Manchester, FM0 and differential Manchester. This design produces all three
from one small circuit: five two-input cells and a single D flip-flop. Two
mode pins (M1, M2) and the flip-flop's clear input (CLR) choose the code. Every
cell is in use in every mode, so none of the hardware sits idle.

The cells are modelled as dual-rail *efficient charge recovery logic* (ECRL)
gates. ECRL is an adiabatic logic family. Each gate has a true and a
complementary output rail, charged from a ramped "power clock" instead of a
fixed supply. That gives low energy per operation. It also makes the supply
current largely independent of the data, which makes power-analysis attacks
harder. The RTL keeps the dual-rail structure and the power-clock input of
each cell. Energy and current are analog effects, so the logic model does not
reproduce them.

## The three line codes

Each data bit takes one period of the bit clock CLK. CLK is high during the
first half of the bit and low during the second.

| code | first half of a bit | second half |
|---|---|---|
| Manchester | `not X` (a 0 is sent high→low, a 1 low→high) | `X` |
| FM0 | always the opposite of the previous level | same as the first half for a 1, opposite for a 0 |
| differential Manchester | previous level for a 1, its opposite for a 0 | always the opposite of the first half |

In words:

- **FM0** changes level at every bit boundary, and changes again in mid-bit
  when the bit is 0.
- **Differential Manchester** changes level in every mid-bit, and also at the
  start of a bit when the bit is 0.

FM0 and differential Manchester depend on the previous line level. That one bit
of history is the only state in the design.

## How one circuit makes all three

Let Q be the flip-flop's output. On each rising CLK edge the flip-flop stores
OUT. That is the level of the second half of the bit that has just ended.
The datapath is:

```
MUX1  = M1 ? X : 0
XNOR  = Q xnor X
XOR1  = Q xor MUX1
MUX2  = CLK ? XOR1 : XNOR        (first half : second half)
OUT   = MUX2 xor M2              (XOR2)
D(DFF) = OUT,  clocked by CLK,  CLR = active-low asynchronous clear
```

Here is what the mode settings give. M2 = 1 in all three modes.

| mode | M1 | M2 | CLR | first half | second half |
|---|---|---|---|---|---|
| Manchester | 1 | 1 | 0 | `not X` | `X` |
| FM0 | 0 | 1 | 1 | `not Q` | `Q xor X` |
| differential Manchester | 1 | 1 | 1 | `Q xnor X` | `Q xor X` |

- **Manchester:** CLR = 0 holds Q at 0. OUT then becomes `X xor CLK`.
- **FM0:** MUX1 passes 0, so the first half is the inverse of the last level.
  That is the toggle at every bit boundary. The second half toggles again
  only for a 0.
- **Differential Manchester:** the second half is always the inverse of the
  first half. The first half keeps the last level for a 1 and inverts it for
  a 0.

M2 is 1 in every documented mode. Setting M2 = 0 does not simply invert the
code. With CLR = 0 it gives Manchester of the opposite polarity. The other
combinations give codes outside the three above. The RTL does not block them.

### The timing the design relies on

The flip-flop samples OUT on the same rising CLK edge that moves MUX2 over to
the first-half branch. So the flip-flop must capture the *old* OUT before the
change has passed through MUX2, XOR2 and the output buffer. In silicon this is
an ordinary hold-time condition, and the path delay meets it. The cell models
give the same behaviour in simulation: each cell has a propagation delay
`TPD_PS`, 20 ps by default. A zero-delay simulation of the same netlist would
race. Keep the delays if you restructure the cells.

Rules for driving the encoder:

- Change X (and the mode pins) only after a rising CLK edge. Hold it until the
  next one. The testbenches change X 100 ps after the edge.
- The code for a bit appears within that same bit period. The first half
  settles at most five cell delays after X changes, and the second half a few
  cell delays after the falling CLK edge. There is no pipeline latency, and
  one bit is sent per CLK period.

### Starting level and mode changes

- After CLR = 0 the flip-flop holds 0.
- The PRE input (active low) presets it to 1. PRE is this design's own
  addition. The flip-flop it uses has a preset input, but the encoder
  diagram leaves it unconnected.
- The starting level sets the polarity of the first FM0 or differential
  Manchester bit. For example, FM0 of a leading 0 goes 0→1 when started from
  Q = 1, and 1→0 when started from Q = 0.
- To set a starting level, hold CLR or PRE low across one rising CLK edge.
  Release it together with the first data bit.
- You can switch modes between any two bits without a restart. Leaving
  Manchester mode starts the next code from level 0, because clear held Q
  there.

## ECRL cells and the power clock

| module | function | rails |
|---|---|---|
| `ecrl_buf_inv` | buffer/inverter | `out = not in`, `out_b = in` |
| `ecrl_nand_and` | NAND/AND | `out = x and y`, `out_b = x nand y` |
| `ecrl_xnor_xor` | XNOR/XOR | `out = x xor y`, `out_b = x xnor y` |
| `ecrl_mux` | 2:1 multiplexer | `out = s ? x : y`, `out_b` its complement |

Each real cell is a cross-coupled PMOS pair fed from the power clock `pclk`,
above an NMOS pull-down network on each rail. The models describe that at
logic level:

- **pclk = 1 (evaluate):** the rails carry the result and its complement.
- **pclk = 0 (recovery):** both rails are 0, because they can only be
  charged through pclk.

With pclk held at 1 the cells act as static differential gates. The
encoder is meant to be run that way. The published circuit used a 0.8 V,
12.5 MHz trapezoidal power clock, but it does not say how that clock lines up
with the much faster bit clock, so the model does not try to.

The cells are `behavioural` models of transistor circuits. They use `assign #`
delays and `timeunit 1ns / timeprecision 1ps`, and they do describe
synthesizable functions. For a standard-cell implementation, replace them
with ordinary gates (and the flip-flop with a library cell), and check hold
timing on the OUT→D path.

The encoder also needs some glue that is this design's own choice:

- Plain inverters make the complement rails of X, M1, M2 and CLK at the
  boundary.
- The flip-flop's Qb output is Q's complement rail.
- An `ecrl_buf_inv` cell drives OUT/OUT_b. The input rails are swapped
  there, so OUT equals XOR2's true rail.
- The NAND/AND cell is not needed by the encoder datapath. The top level
  instantiates it as a stand-alone cell on the `cell_*` ports, so the whole
  four-cell set is present and simulated.

## Modules

```
multimode_encoder            top: the encoder plus the stand-alone NAND/AND cell
├── ecrl_mux      u_mux1     M1 ? X : 0
├── ecrl_xnor_xor u_xnor     Q xnor X      (cell's out_b rail)
├── ecrl_xnor_xor u_xor1     Q xor MUX1
├── ecrl_mux      u_mux2     CLK ? XOR1 : XNOR
├── ecrl_xnor_xor u_xor2     MUX2 xor M2
├── ecrl_buf_inv  u_outbuf   output stage → OUT, OUT_b
├── dff_pc        u_dff      positive-edge D flip-flop, async preset/clear
└── ecrl_nand_and u_nand_cell
```

Top-level ports of `multimode_encoder` (parameter `TPD_PS`, default 20):

| port | dir | meaning |
|---|---|---|
| `CLK` | in | bit clock, high in the first half-bit |
| `X` | in | data, changes after the rising CLK edge |
| `M1`, `M2` | in | mode pins (see table above) |
| `CLR` | in | active-low asynchronous clear; 0 selects Manchester |
| `PRE` | in | active-low asynchronous preset; tie to 1 when unused |
| `pclk` | in | power clock of all cells; hold at 1 |
| `OUT`, `OUT_b` | out | encoded line signal and its complement |
| `cell_x`, `cell_y` | in | inputs of the stand-alone NAND/AND cell |
| `cell_and`, `cell_nand` | out | its two rails |

About `dff_pc`:

- Both asynchronous inputs are active low. Clear wins if both are low.
- It uses the usual three-edge sensitivity list. One consequence, as in any
  such model: releasing clear while preset stays low leaves q at 0 until the
  next clock edge.
- Some synthesis front ends do not accept two asynchronous controls on one
  register. Map it to a library flip-flop with set and reset.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_multimode_encoder` is the end-to-end test at default parameters. It
  runs the 32-bit pattern `01001011111000110100101111100011` in each mode,
  from both starting levels. Then it sends 3000 random bits with random mode
  switches between bits and occasional preset/clear restarts. It also covers
  a power-clock recovery phase (all rails must be 0), the OUT_b rail and the
  stand-alone cell. Every half-bit is checked against `enc_ref_pkg`, which
  encodes from the coding rules alone. The test also counts each mechanism
  (the three modes, mode switches, preset and clear restarts, FM0 mid-bit
  toggles, differential-Manchester start toggles, the recovery phase) and
  fails if one never occurred.
- `tb_dsrc_pattern_32bit` compares the full 64 half-bit codes of the 32-bit
  pattern with values worked out by hand. That covers Manchester, and FM0 and
  differential Manchester from each starting level. It also checks that the
  pattern takes exactly 32 CLK periods.
- `tb_dff_pc` tests the flip-flop: random data, clear and preset pulses
  between edges, clear winning over preset, and preset held across an edge.
- `tb_ecrl_buf_inv`, `tb_ecrl_nand_and`, `tb_ecrl_xnor_xor` and `tb_ecrl_mux`
  test the cells. Each applies every input combination under both pclk
  levels. It checks that the output holds its old value 5 ps before
  `TPD_PS` has passed and shows the new value 5 ps after.

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  --top-module tb_multimode_encoder -y rtl -y tb +libext+.sv \
  tb/enc_ref_pkg.sv tb/tb_multimode_encoder.sv -o sim
./obj_dir/sim
```

Use the same command for the other testbenches, changing the top module and
file. Only `tb_multimode_encoder` needs `tb/enc_ref_pkg.sv`, listed before it
as shown. Verilator has no
x or z states, so every testbench drives or initialises everything it reads.

## What this RTL does not capture

- **Physical figures.** The transistor circuit was reported at 877.192 MHz,
  with a 5.7 ns delay, about 32 µW at 0.8 V, and a supply-voltage sweep
  from 1.0 V to 0.5 V. These are properties of an 18 nm FinFET circuit. They
  are not modelled, and the 20 ps cell delay is only a placeholder.
- **Power-analysis resistance.** The data-independent supply current is an
  analog property of the ECRL cells and cannot be seen in a logic
  simulation. The models only keep the dual-rail form, in which exactly one
  rail of each cell is high during evaluation.
- **The rest of a DSRC transponder.** The controlling microprocessor, the
  rest of the baseband (modulation, error correction, clock recovery), the
  RF front end, the FinFET devices and the power-clock generator are outside
  this design.
- **Flip-flop internals.** The flip-flop is written behaviourally, not as
  gates.
