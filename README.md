# OVSF code generator built from hardlimiter gates and JK flip-flops

This is synthesizable SystemVerilog for a generator of **orthogonal variable
spreading factor (OVSF)** codes, the channelization codes of WCDMA/UMTS. One
small circuit produces any code `C(SF,N)` of the OVSF tree for spreading
factors `SF = 4, 8, ..., 512`. It needs no code table. A counter runs through
the chip index, and each chip is the parity of the index bits selected by the
code number `N`.

The circuit follows an all-optical realisation of this generator. In that
version every gate is a Bragg-grating **hardlimiter** and every flip-flop is a
pair of coupled polarization switches (PSWs) turned into a JK flip-flop. The RTL
keeps that structure, with each gate and flip-flop as a module of its own. It is
a clocked digital equivalent, though, and it does not simulate light.

## OVSF codes in one paragraph

The tree starts from the one-chip code `C(1,0) = (-1)`. Each code `c` of length
`S` has two children of length `2S`:

- `C(2S,2i)   = (c, c)`
- `C(2S,2i+1) = (c, -c)`

All codes of one level are mutually orthogonal. Two codes of different levels
are orthogonal unless one is an ancestor of the other. A user at a higher data
rate gets a shorter code, closer to the root.

Chips are written as bits, with **0 for -1 and 1 for +1**. For example,
`C(8,1) = -1 -1 -1 -1 +1 +1 +1 +1` is `00001111`.

## How a chip is computed

Write the chip index `t` (0 to SF-1) on the top `m = log2(SF)` counter bits. The
chip is then:

```
code = (n0 & b8) ^ (n1 & b7) ^ (n2 & b6) ^ ... ^ (n8 & b0)
```

The code number `N = n8..n0` is paired with the counter in **reverse bit order**.
The LSB of `N` meets the MSB of the counter. This matches the recursion: the
last branch taken in the tree (`n0`) decides whether the second half of the
code is inverted, and the second half is where the counter MSB is 1.

For SF = 8 the counter runs on `b8 b7 b6`, and the chip is
`(n0&b8) ^ (n1&b7) ^ (n2&b6)`:

| N | chips for t = 0..7 |
|---|---|
| 0 | 0000 0000 |
| 1 | 0000 1111 |
| 2 | 0011 0011 |
| 3 | 0011 1100 |
| 4 | 0101 0101 |
| 5 | 0101 1010 |
| 6 | 0110 0110 |
| 7 | 0110 1001 |

## The counter with a movable LSB (`ripple_counter`)

This is the part that needs the most care.

The counter always has 9 stages, `b0..b8`, and `b8` is always the MSB. What
changes with SF is **which stage is the LSB**. Stages below the LSB are never
clocked and stay 0. Because of that, the AND/XOR network above works for every
SF without being reconfigured. The products `n_k & b_(8-k)` for unused stages
are simply 0.

The **SF register** (`sf_register`) holds SF in binary, which is one-hot:

| SF | S9..S0 | LSB stage | counting bits |
|---|---|---|---|
| 4 | 0000000100 | b7 | b8 b7 |
| 8 | 0000001000 | b6 | b8 b7 b6 |
| 16 | 0000010000 | b5 | b8..b5 |
| ... | ... | ... | ... |
| 512 | 1000000000 | b0 | b8..b0 |

`S1` and `S0` are wired to 0. SF = 1 or 2 therefore gives an all-zero register,
and the counter stays idle.

How one stage `i` works:

1. Register bit `S_(9-i)` is ANDed with the clock pulse `ck`. Only the stage
   whose bit is set receives the clock.
2. That gated clock is ORed with the carry from stage `i-1`. The result clocks a
   T flip-flop, which is a JK flip-flop with J = K = 1.
3. The carry out of a stage is "this stage is being clocked while its Q is 1",
   meaning it is wrapping from 1 to 0. This is one more hardlimiter AND.

The carry ripples through the stages within one `clk` cycle. The selected bits
therefore count `0, 1, ..., SF-1, 0, ...`, one step per `ck` pulse.

**Departure from the optical circuit.** The optical diagram feeds the previous
stage's Q straight into the OR and relies on the pulse timing of the optical
flip-flops. A synchronous circuit needs a one-cycle carry pulse instead, so the
carry is the explicit 1-to-0 transition described in step 3.

## Gates from a hardlimiter (`hardlimiter`, `optical_*`)

A hardlimiter receives the combined intensity of its inputs, which is the
number of lit inputs. It is biased at a limit `a`:

- **Below `a`:** everything is reflected (port O2) and nothing is transmitted
  (port O1).
- **At or above `a`:** `a` is transmitted and the excess is reflected.

This one rule gives all the gates the design uses:

| module | inputs | a | O1 (transmitted) | O2 (reflected) |
|---|---|---|---|---|
| `optical_and_xor` | 2 | 2 | A AND B | A XOR B |
| `optical_or` | 2 | 1 | A OR B | (A AND B, unused) |
| `optical_and3` | 3 | 3 | A AND B AND C | unused |

The intensity 2 or 3 on an AND output is normalised to a logic 1.

`hardlimiter` models intensities as small integers, in units of one input
pulse. It is ordinary combinational logic, and a synthesis tool reduces each
gate to the plain Boolean function. The wrappers exist so that the netlist
mirrors the optical one, gate for gate.

## Flip-flops (`psw_flip_flop`, `jk_flip_flop`)

`psw_flip_flop` is the bistable pair of polarization switches, reduced to its
function. A SET pulse gives state 1 (`q = 1`) and a RESET pulse gives state 2
(`q = 0`). Both outputs `q` and `qn` are brought out, and an assertion forbids
SET and RESET together.

`jk_flip_flop` adds two three-input hardlimiter ANDs in front:

- `SET = Q' & J & ck`
- `RESET = Q & K & ck`

This gives the usual JK behaviour on each `ck` pulse:

| J K | on a `ck` pulse |
|---|---|
| 00 | hold |
| 01 | clear |
| 10 | set |
| 11 | toggle |

With J = K = 1 it is the T flip-flop of the counter.

## Top level: `ovsf_code_generator`

Parameter: `STAGES = 9`. This sets the counter stages and code ID bits. The SF
register has `STAGES+1` bits. The default comes from `ovsf_pkg`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock; every register uses its rising edge |
| `rst` | in | 1 | synchronous reset: SF register 0 (idle), N = 0, counter 0 |
| `ck` | in | 1 | clock pulse: one chip per cycle in which it is high |
| `sf_load`, `sf_in` | in | 1, 10 | load the SF register (S9..S0, one-hot) |
| `id_load`, `id_in` | in | 1, 9 | load the code ID register (n8..n0) |
| `b` | out | 9 | counter bits b8..b0 |
| `code` | out | 1 | current chip, 0 = -1, 1 = +1 |

Timing rules:

- **Loads.** Either load also clears the counter. In the cycle after a load,
  `code` is chip 0 of the new code.
- **Chip rate.** Each cycle with `ck = 1` advances to the next chip on that
  clock edge. `code` is combinational from registers, so it is valid for the
  whole following cycle.
- **Period.** The code repeats after exactly SF pulses.
- **Idle cycles.** A cycle with `ck = 0` holds the chip.

Typical use: load `sf_in = 10'b0000001000` (SF = 8) and `id_in = 6`. Then hold
`ck` high. `code` runs `0 1 1 0 0 1 1 0`, repeating, which is `C(8,6)`.

## Choices made here, not in the optical design

- **Synchronous clocking.** The system clock `clk` is used with the optical
  clock pulse as the enable `ck`. The optical circuit runs on roughly 0.1 ns
  pulses and has no separate clock.
- **Ripple carry.** The carry is the 1-to-0 transition of the stage below, as
  described above.
- **Register interface.** The load strobes, the synchronous reset and its
  values, and the counter restart on every load are this design's own choices.
- **Gate normalisation.** Optical gate outputs are normalised to 0/1, and
  intensities are whole units.
- **XOR chain.** The 9-input XOR is a chain of eight 2-input hardlimiter XORs.
- **Not modelled.** The optical amplifiers (SOAs) that make up coupler and
  cascade losses, the couplers themselves (modelled only as the summing of
  intensities) and the external clock laser have no logic function. The clock
  laser's pulses enter as `ck`.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- **`tb_hardlimiter`, `tb_optical_*`:** exhaustive truth tables for each bias.
- **`tb_psw_flip_flop`, `tb_jk_flip_flop`:** random pulse sequences against a
  reference model. The JK test checks that all four JK cases occurred.
- **`tb_sf_register`, `tb_code_id_register`:** loads, holds, and `S1`/`S0`
  tied to 0.
- **`tb_ripple_counter`:** every SF from 4 to 512, with random idle cycles.
  It checks the count on the top bits, that the lower bits stay 0, that the
  count wraps after SF pulses, and that an SF register of 0 leaves the counter
  idle.
- **`tb_ovsf_code_logic`:** all 512 x 512 combinations of N and counter value
  against the parity equation, plus the SF = 8 code table.
- **`tb_ovsf_code_generator`:** end to end, at the default size. It runs every
  code of every level from SF = 4 to SF = 512. That is 1020 codes, each
  clocked for a full period plus one chip. Each chip is compared with a
  reference built from the tree recursion.
  - It also checks the printed SF = 4 and SF = 8 code values, orthogonality
    within each level, the repeat after SF pulses, idle cycles, the idle
    SF = 1/2 setting, and mid-code restarts on SF and on N reloads.
  - It counts how often each of these occurs and fails if one never does.
  - It runs in about a second.
- **`tb_sf8_codes`:** `C(8,5)`, `C(8,6)` and `C(8,7)`, with the counter
  stepping on b8 b7 b6 and b6 the fastest-changing bit.

To simulate with Verilator, for example the top-level test:

```
verilator --binary --timing --assert -Irtl rtl/ovsf_pkg.sv \
    tb/tb_ovsf_code_generator.sv --top-module tb_ovsf_code_generator \
    -Mdir obj -o sim
./obj/sim
```

Any other testbench works the same way with its own name. The modules are found
through `-Irtl` by file name. `rtl/ovsf_pkg.sv` must come first.

## Files

`rtl/` holds one module or package per file:

- `ovsf_pkg`: shared constants.
- `hardlimiter`, `optical_and_xor`, `optical_or`, `optical_and3`: the gates.
- `psw_flip_flop`, `jk_flip_flop`: the flip-flops.
- `sf_register`, `code_id_register`, `ripple_counter`, `ovsf_code_logic`: the
  generator's parts.
- `ovsf_code_generator`: the top level.

`tb/` holds one testbench per module, plus `tb_sf8_codes`.

Lint notes: some gate outputs are left open on purpose, such as the XOR port of
a hardlimiter used only as an AND. The last stage's carry and the `Q'` outputs
of the counter flip-flops are unused. `S1` and `S0` of the SF register are
constant 0 by design.
