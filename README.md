# Low-power Blum Blum Shub random number generator

Blum Blum Shub (BBS) is a cryptographically secure pseudo random number
generator built on one recurrence:

    X0     = s^2 mod m
    X(n+1) = X(n)^2 mod m,      m = p * q

where p and q are primes congruent to 3 mod 4 and the seed s shares no factor
with m. Each step costs a squaring and a modular reduction, so a hardware BBS
is dominated by wide multipliers and dividers, and those are what burn
dynamic power when their inputs toggle.

This RTL implements the architecture of the paper "A BBS Random Number
Generator for Low Power Applications" (A. Hassanzadeh, V. Mahboubi). Its
idea: most of the hardware is needed only once per seed. The design splits
into a **seed section**, used for three clock cycles when a new seed arrives,
and a **stream section**, used for every output. After seeding, the seed
section's registers stop loading. The s\*s and p\*q multipliers and the
s^2 mod m divider then see constant operands and do not switch. While
streaming, only the feedback squarer, the stream divider and the output
register change. Registers at the primary inputs also stop the constantly
changing seed input (typically a true random source) and glitches on s, p
and q from rippling through the multipliers and the divider.

## Datapath

```
            seed section (clocked only while seeding)        |  stream section (phi4)
                                                             |
 s --[R phi1]--s_r--> (x) s*s ---s_sq---> [ % ]--x0_d--[R phi3]--x0_r--> (x) x0*x0 --x0_sq--+
                                          ^  m                                              |
 p --[R phi2]--p_r--+                     |                                                 v
                    (x) p*q --m(low W)----+-------------------------------+           +----------+
 q --[R phi2]--q_r--+                                                     |           |   MUX    |<-- sel
                                                                          |           +----------+
                                                                          |      fb_sq ^   | dividend
                                                                          |            |   v
                                                                          +--m-----> [ % ] stream divider
                                                                                       |   | x_d
                                                              (x) x*x <----- x --------+---[R phi4]--> x
                                                               feedback squarer             |
                                                                                       bit generator
                                                                                   even_par odd_par lsb
```

`[R phiN]` is a `bbs_phase_reg`: a W-bit register that loads only in the
cycle whose phase strobe is high. `(x)` is `bbs_multiplier` (W x W to 2W
bits) and `[ % ]` is `bbs_divider` (2W by W bits, residue output used).

The register placement gives a short pipeline. s and p, q are captured
first, then X0 = s^2 mod m is captured, then the stream loop runs through
the output register.

## Phases and the controller

`bbs_controller` is a six-state FSM (`bbs_pkg::bbs_state_e`). It decides
which register group may load in each cycle, and it never enables more than
one group at a time (an assertion checks this):

| state      | strobe | what is loaded                          | MUX select |
|------------|--------|-----------------------------------------|------------|
| IDLE       | none   | nothing                                 | -          |
| SEED_S     | phi1   | s                                       | -          |
| SEED_PQ    | phi2   | p, q (so m = p\*q becomes valid)        | -          |
| SEED_X0    | phi3   | X0 = s^2 mod m                          | -          |
| FIRST      | phi4   | X1 = X0^2 mod m (if `run`)              | x0^2       |
| STREAM     | phi4   | X(n+1) = X(n)^2 mod m (each `run` cycle) | feedback   |

Timing seen at the ports:

```
edge:     e0        e1        e2        e3        e4        e5
load  ____/‾‾‾‾\_____________________________________________________
state  IDLE | SEED_S  | SEED_PQ | SEED_X0 | FIRST   | STREAM  | STREAM
              s taken   p,q taken  X0 taken  X1 out    X2 out
x_new ________________________________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
```

- `load` seen high at edge e0 starts seeding. s must be valid in the cycle
  after e0, and p and q in the cycle after that (`busy` is high through all
  three seeding cycles). Holding all three inputs stable from `load` until
  `busy` falls is the simple rule.
- The first output, X1, is in `x` after edge e0+4. After that a new X comes
  every cycle while `run` is high. With `run` low nothing is loaded and `x`
  holds.
- `load` may be raised at any time, including in the middle of a stream, and
  it wins over `run`. `x_valid` drops as soon as re-seeding starts. It rises
  again with the first value of the new seed.
- `x_new` is high for one cycle after each load of the output register.

## Interface of `bbs_lp_rng`

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `load`     | in  | 1 | start seeding from `s`, `p`, `q` |
| `run`      | in  | 1 | produce one X per cycle while high |
| `s`, `p`, `q` | in | W | seed and the two primes |
| `busy`     | out | 1 | seeding in progress |
| `x`        | out | W | current X(n) |
| `x_valid`, `x_new` | out | 1 | x belongs to the current seed / was just updated |
| `even_par`, `odd_par`, `lsb` | out | 1 | output bits derived from x |

Parameter `W` (default 32, `bbs_pkg::BBS_WIDTH`) is the width of s, p, q, m
and X. The published generator was measured at 32 bits, and also at 8 and
16 bits.

Caller's obligations, which the hardware does not check:
- p\*q must fit in W bits and must not be zero. Only the low W bits of the
  product are used. A simulation assertion reports a modulus that does not
  fit.
- p and q should be distinct primes with p mod 4 = q mod 4 = 3, and s should
  share no factor with m. Otherwise the sequence is still computed correctly
  but has none of BBS's security properties.
- For real security, m must be far larger than 32 bits. The structure
  scales with `W`, but the combinational multipliers and dividers grow
  quadratically.

### Output bits

`bbs_bit_gen` gives three one-bit outputs for each X. `even_par` is the XOR
of all bits of X. `odd_par` is its complement. `lsb` is bit 0. A BBS
generator traditionally releases only one or a few low-order bits per step;
the full word `x` is also available.

Worked example with s = 3, p = 11, q = 19 (m = 209):

| n | X(n) | even_par | odd_par | lsb |
|---|------|----------|---------|-----|
| 0 | 9    | 0 | 1 | 1 |
| 1 | 81   | 1 | 0 | 1 |
| 2 | 82   | 1 | 0 | 0 |
| 3 | 36   | 0 | 1 | 0 |
| 4 | 42   | 1 | 0 | 0 |
| 5 | 92   | 0 | 1 | 0 |

X0 stays inside the design, in the phi3 register. The output stream starts
with X1. The LSB column of the paper's version of this table lists 0 for
X1 and 1 for X2. Those values contradict 81 and 82; this design outputs the
true bit 0.

## Where the RTL departs from the published block diagram

- **Feedback squarer.** The published diagram routes the output register
  straight back into the MUX. Taken literally, the loop would compute
  X mod m = X, and the output would never change. The recurrence needs X^2,
  so a fourth multiplier (`u_mul_fb`) squares the fed-back value before the
  MUX.
- **Clock gating as clock enables.** The paper describes separate clock
  phases phi1..phi4 and gates the clocks of idle stages. Here every register
  runs on one clock, and each register group has a phase strobe as its
  clock enable. An FPGA implements gated clocks the same way. The effect on
  switching activity is the same: registers that are not enabled keep their
  values, so the logic behind them stays quiet. For an ASIC, the enables
  map directly onto integrated clock-gating cells. This form also avoids
  the hold races that a behaviourally written gated clock creates in
  simulation.
- **Phase timing.** One clock cycle per phase and the `load`/`run`
  handshake are this design's own choices. The paper gives only the order
  of the phases.
- **Not built:**
  - Power gating and MTCMOS/subthreshold techniques. The paper mentions
    them only as further options.
  - The conventional, ungated BBS that the paper uses as its comparison.
  - The true random seed source. s is an input.
  - The power measurements themselves (30% or more saving at 32 bits). RTL
    simulation cannot reproduce them.
- **Arithmetic units.** The multiplier and divider insides are not
  specified. They are written with `*`, `/` and `%` and left to synthesis.
  At W = 32 this gives a 64-by-32-bit combinational divider in the stream
  loop, which limits the clock frequency. An iterative divider would trade
  throughput for area if needed. The unused quotient outputs are kept
  because the diagram draws them; synthesis removes them.

## Files

RTL (`rtl/`):
- `bbs_pkg.sv`: default width, controller state and MUX-select enums, the
  phase-strobe struct.
- `bbs_lp_rng.sv`: the top level.
- `bbs_controller.sv`: the phase sequencer.
- `bbs_phase_reg.sv`: the phase-loaded register.
- `bbs_multiplier.sv`, `bbs_divider.sv`: the arithmetic units.
- `bbs_mux.sv`: the stream MUX.
- `bbs_bit_gen.sv`: the output bits.

Testbenches (`tb/`): each prints `TB_RESULT checks=N failures=M` and has a
watchdog.
- `tb_bbs_lp_rng.sv`: end-to-end test at the default width. It covers the
  worked example; six random 16-bit prime pairs, each streamed for 300
  cycles with random stalls; re-seeding in mid-stream; the 4-cycle
  first-output latency; and a check that the seed-section registers hold
  while s, p and q are scrambled every cycle. It counts each of these
  mechanisms and fails if one never happens.
- `tb_bbs_widths.sv` with its helper `bbs_width_run.sv`: 512 samples each at
  W = 8 (m = 209), W = 16 (m = 163\*251) and W = 32 (m = 65519\*65479). It
  checks every value and the one-per-cycle rate.
- `tb_bbs_controller.sv`, `tb_bbs_phase_reg.sv`, `tb_bbs_multiplier.sv`,
  `tb_bbs_divider.sv`, `tb_bbs_mux.sv`, `tb_bbs_bit_gen.sv`: unit tests.
  The references are independent of the RTL: shift-and-add for the product,
  the identity a = q\*b + r with r < b for the divider, and bit counting for
  parity.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv rtl/bbs_pkg.sv tb/tb_bbs_lp_rng.sv \
    --top-module tb_bbs_lp_rng
./obj_dir/Vtb_bbs_lp_rng
```

Replace the testbench name to run any other test. `rtl/bbs_pkg.sv` must
come first on the command line. Each test finishes in well under a second.

Lint: `verilator --lint-only -Wall -y rtl +libext+.sv rtl/bbs_pkg.sv rtl/bbs_lp_rng.sv`.
Two kinds of warning remain, and both are expected:
- `UNUSEDSIGNAL` on the unused quotients.
- `SYNCASYNCNET` on `rst_n`. The assertions use `rst_n` in `disable iff`
  besides its use as the asynchronous reset.
