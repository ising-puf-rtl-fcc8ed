# Ising-PUF in SystemVerilog

An arbiter PUF on its own is easy to model: its response is the sign of a
linear sum of stage delays, so a few thousand challenge-response pairs (CRPs)
are enough to predict it. The Ising-PUF escapes that by coupling many tiny
PUFs into a lattice, like the spins of an Ising model. Each cell holds a
4-input arbiter PUF and a one-bit *spin* register. The four neighbouring spins
are the challenge of the cell's PUF, and the PUF's response becomes the cell's
next spin. After a challenge has flipped some spins, the lattice is clocked a
few times ("annealing"). Every spin is both a response and a challenge bit of
its neighbours, so the spin pattern evolves through many feedback loops in a
way that depends on every cell's mismatch. The XOR of all spins at the end is
the 1-bit response.

There is a second benefit. The whole chip is described by its 64 small CRP
tables (16 entries each) plus one "dark" bit per cell. An authentication server
that stores these can compute the response to any challenge, so it does not
need a database of raw CRPs.

This repository holds synthesizable RTL for the 8 x 8 lattice, its address
decoders and its control logic. The arbiter PUF, which is an analog delay race
on silicon, is written as a behavioural model (see below).

## How one response is produced

A challenge has one bit per cell: 64 bits for 8 x 8. Bit `i` belongs to cell
`i = y*8 + x`, numbered row by row from the top-left cell. The control logic
runs four phases:

| phase | cycles | what happens |
|---|---|---|
| clear | 1 | every spin is set to 0 (skipped with `keep_state`) |
| map | 64 | cells are addressed one per cycle; where the challenge bit is 1, that cell's spin is inverted |
| anneal | `n_anneal` (10) | all cells load their new spin at the same clock edge |
| read | 64 | cells are addressed again; the addressed spin goes onto one shared wire, is shown on `spin_bit`, and is XORed into the response |

Only one spin is inverted per cycle, and only one spin is read per cycle. This
keeps the cell small: a cell sees one row line, one column line and a handful
of global control lines.

Take the edge that samples `start` as edge 0. Then `done` is high right after
edge `2*64 + n_anneal + 1`, which is 139 cycles with the default 10 steps.
With `keep_state` it comes one edge earlier. `response` keeps its value until
the next `start`.

### Challenge sequences (`keep_state`)

The spin registers keep their state between evaluations. With `keep_state = 1`
the clear phase is skipped, so the new challenge flips spins of the pattern
left by the previous one. A stream of challenges then keeps stirring the
lattice, and each response depends on the whole history. The input that
selects this is this design's own. The rest of the sequence follows the
description of the Ising-PUF.

## The cell (`spin_cell`)

```
 neighbours {right, upper, left, lower}
        |                 |
   arbiter PUF       4-input XOR
        |                 |
        +----- MUX1 ------+      select: dark-cell register
                 |
   ~spin ----- MUX2               select: invert
                 |
           spin register  ------> to the four neighbours
                 |
        (AND sel & read) -------> spin-global (OR over all cells)
```

* **Spin register.** During annealing it loads at every clock. Otherwise it
  loads only when `invert` is high and the cell is selected (both its column
  line and its row line are high). The original cell uses a multiplexed or
  gated clock for this. Here the register is clocked by `clk` and uses a
  clock enable, which loads at the same edges.
* **Dark-cell register.** Its input is the constant 1. It is loaded when
  `set_dark` is high and the cell is selected. Only reset clears it.
* **Read driver.** The cell puts its spin on one shared wire. A real chip
  would use a tri-state buffer. Here each cell ANDs its spin with
  `select & read`, and the array ORs the 64 results together. This is the
  same wire function because at most one cell is selected.
* The four neighbour spins feed PUF challenge bits 3..0 in the order right,
  upper, left, lower.

### Dark-cell elimination

An elemental PUF whose two lanes are almost balanced can change its answer
with temperature or supply voltage. In a lattice, one such cell is enough:
its error spreads to its neighbours at every annealing step and soon spoils
the whole pattern. The end-to-end test shows this. Before the dark bits are
loaded, 14 of 32 responses differ between 20 °C and 100 °C.

Such cells are found at registration: a cell is *dark* if any of its CRPs
differs between the two test temperatures. A dark cell is not simply left
out. Its PUF response is replaced by the XOR of its four neighbour spins.
XOR is stable and nonlinear, and the dark cells fall at random places, so the
lattice stays chaotic while becoming repeatable. With the dark bits loaded,
all 256 test responses at 50 °C and 100 °C match the 20 °C ones, and they
match the server-side emulation.

## The lattice (`ising_array`)

Cell `(x, y)` takes its right, upper, left and lower neighbours as its
challenge. The document does not say what the edge cells see. Here a missing
neighbour is tied to 0, which gives an open lattice with no wrap-around.
Because of this, an edge cell can only ever see 8 of its 16 patterns, and a
corner cell only 4. A torus would be a one-line change per edge in
`ising_array.sv`.

## Control logic and decoders

`ising_ctrl` runs the phases above using separate X and Y counters. The X
counter runs fastest. `addr_decoder`, used twice, turns each count into
one-hot column or row select lines. The controller also handles two commands
that are not part of an evaluation:

* `load_dark` scans the cells once and raises `set_dark` for every cell whose
  bit in `dark_bits` is 1. Loading takes 64 cycles.
* `cfg_we` writes the annealing count. It resets to `N_A = 10`.

An assertion in `ising_ctrl` checks that at most one cell operation (clear,
set-dark, invert, anneal, read) is active in any cycle.

## Registration and authentication

The protocol this PUF is meant for:

1. **Registration (at the factory).** Read every elemental PUF's 16-entry
   table at two temperatures. Mark the cells whose tables differ as dark.
   Store the tables and the dark bits on the server. This is the secret
   model: 1,024 table entries plus 64 dark bits, instead of one entry for
   every possible 64-bit challenge.
2. **Authentication.** The server picks a random challenge and sends it with
   the dark bits. It computes the expected response with its secret model and
   compares it with the chip's response.

The RTL supports step 1 through the programmable annealing count. Set the
count to 1. Then a challenge that sets only the four neighbours of cell `k` to
pattern `p` leaves cell `k`'s PUF response to `p` in spin `k`, and the
read-out on `spin_bit`/`spin_idx` shows it. How a real chip exposes its
elemental CRPs is not specified, so this mechanism is this design's choice.
Once registration is over, a product would want to disable this path.

## The arbiter-PUF model (`arbiter_puf`): what to trust

The elemental PUF is a 4-stage arbiter PUF. A selector stage passes both lanes
straight through when its challenge bit is 1 and swaps them when it is 0. An
arbiter flip-flop, with the top lane on D and the bottom lane on the clock
pin, answers 1 when the top lane arrives first.

The model does the same race with integers:

* Each stage has four path delays: straight-top, straight-bottom, cross
  bottom-to-top and cross top-to-bottom.
* Each delay is `2000 + m + ((c * temp) >>> 5)`.
  * `m` is the mismatch, uniform in [-64, 64].
  * `c` is the temperature coefficient, in {-1, 0, 1}.
  * Both are drawn from a 32-bit integer hash of (`SEED`, cell, element).
* The arbiter adds an offset in [-16, 16].

All of these numbers are in `ising_pkg` and were chosen for this model.
`SEED` stands for the manufactured chip, and the input `temp` (°C) stands for
the operating condition. Neither would exist on a real chip. With the default
seed, 13 of the 64 cells (20 %) are dark between 20 °C and 100 °C.

Because the model is deterministic, the robustness it shows after dark-cell
elimination is a perfect 0 %. A real chip also has noise. The model is
synthesizable, so synthesis results of the top include 64 hard-wired delay
calculators. Those figures say nothing about the area of a real cell.

## Results of the included testbenches

| testbench | what it shows |
|---|---|
| `tb_ising_puf` | full 8 x 8 design at default parameters. Registration through the chip (784 reachable patterns per temperature, each checked against a reference race). 13 dark cells found. Without elimination, 14 of 32 responses change between 20 °C and 100 °C. With it, 128 challenges at 20/50/100 °C all match the emulator in both response and full spin pattern. A 32-step `keep_state` sequence matches. The latency of every evaluation is checked. |
| `tb_ising_uniqueness` | 8 chips (different `SEED`), 128 challenges each. Mean inter-chip Hamming distance 49.1 %. 20 °C vs 50 °C distance 0 % with elimination and 48 % without. |
| `tb_spin_cell`, `tb_ising_array`, `tb_ising_ctrl`, `tb_addr_decoder`, `tb_arbiter_puf` | unit tests against models in the testbench. Each counts the paths it exercised. |

## Interface of the top (`ising_puf`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears spins, dark bits, controller) |
| `load_dark` | in | 1 | pulse while `busy` is low: load `dark_bits` |
| `dark_bits` | in | 64 | bit `i` set marks cell `i` as dark |
| `start` | in | 1 | pulse while `busy` is low: evaluate `challenge` |
| `challenge` | in | 64 | bit `i` inverts spin `i` |
| `keep_state` | in | 1 | with `start`: skip the clear phase |
| `cfg_we`, `cfg_n_anneal` | in | 1, 8 | write the annealing count (only while idle) |
| `temp` | in | 8 signed | model only: temperature in °C |
| `busy`, `done` | out | 1 | command running; one-cycle end strobe |
| `response` | out | 1 | XOR of all spins of the last evaluation |
| `spin_bit`, `spin_valid`, `spin_idx` | out | 1, 1, 6 | serial read-out during the read phase |
| `n_anneal` | out | 8 | current annealing count |

A command pulse is ignored while `busy` is high. This includes the `done`
cycle, so wait for `busy` to fall before sending the next command.

Parameters: `W = 8`, `H = 8`, `N_A = 10`, `NA_W = 8`, and `SEED` (model only).

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` at the end. For
example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/ising_pkg.sv tb/tb_ising_puf.sv --top-module tb_ising_puf
./obj_dir/Vtb_ising_puf
```

Swap in any other `tb_*.sv` and its module name. The full-size end-to-end test
runs in well under a second. Lint with
`verilator --lint-only -Wall -y rtl rtl/ising_pkg.sv rtl/ising_puf.sv`.
The remaining warnings are harmless:

* `SYNCASYNCNET`: the assertion's `disable iff` uses the asynchronous reset.
* Unused package constants in modules that import `ising_pkg`.
* The array's observation outputs `spins` and `dark`, which the top does not
  use.

## Files

* `rtl/ising_pkg.sv`: control-line struct, controller states, and the delay
  model of the arbiter PUF.
* `rtl/arbiter_puf.sv`: behavioural elemental PUF.
* `rtl/spin_cell.sv`: one cell.
* `rtl/ising_array.sv`: the W x H lattice.
* `rtl/addr_decoder.sv`: X/Y decoder.
* `rtl/ising_ctrl.sv`: control logic.
* `rtl/ising_puf.sv`: the top.
* `tb/`: one testbench per module, plus `tb_ising_uniqueness.sv`.

## Departures and open points

* The edge cells see 0 for their missing neighbours. This is an assumption.
* Gated clocks are written as clock enables. The tri-state read wire is
  written as an AND-OR.
* The synchronous `clear` line, the command handshake, `keep_state`, the
  programmable annealing count and the serial read-out port are additions.
  The original describes the phases but not these interfaces.
* During mapping, every cell is visited, including those whose bit is 0.
  This gives a fixed latency of 139 cycles.
* Dark bits are loaded through the controller at run time. Storing them
  on-chip in non-volatile memory or one-time-programmable ROM is mentioned as
  an option but is not built.
* The authentication server (secret-model store, random challenge source,
  emulator, comparator) is software. It appears only inside `tb_ising_puf`,
  as the reference model.
