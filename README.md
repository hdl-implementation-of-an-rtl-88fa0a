# Soft bit flip LDPC decoder (64-bit, rate 1/2)

This is a small iterative decoder for a low-density parity-check (LDPC) code.
It takes a 64-bit word of hard decisions from a noisy channel and returns the
nearest-looking codeword of a rate-1/2 code with 32 parity checks. It delivers
one word every 8 clock cycles.

Plain bit flipping keeps only one bit per code bit. Every iteration it inverts
the bits that take part in too many failed parity checks. That is cheap, but
it flips on weak evidence and can oscillate. The *soft* bit flip decoder gives
each bit a small signed counter instead:

* the counter's **sign** is the current decision (negative = 1);
* its **magnitude** is how far the decoder trusts that decision.

A failed check does not invert a bit outright. It pulls the counter toward
zero, and the bit changes only when the counter crosses zero. A satisfied check
pushes the counter away from zero. The hardware stays as simple as bit
flipping: XOR gates, a small counter per bit, one adder per bit and a clamp.
The decoder, however, uses a measure of reliability, as message-passing
decoders do.

## Datapath

```
             yin[63:0]
                 |
   +-------> [var_mux] --> [variable node register] --sign--+
   |          (load/update)     64 x 4-bit soft values       |
   |                                                          v
 [saturator]                                      [permutation network] --v2c--> [VNPE x32] --+
   ^                                                          ^                                |
   |                                                          |                                v
 [add/sub] <--flip, power-- [CNPE x64] <--c2v-- [permutation network]   [check_mux] <-> [check node register]
   ^                                                                                   32 parity bits
   +---- current soft values
```

| Module | Role |
|---|---|
| `sbf` | top level: wires the blocks below and holds the output register |
| `sbf_ctrl` | phase counter: check phase, variable phase, frame load |
| `sbf_var_mux` | selects a freshly received word or the updated soft values |
| `sbf_var_reg` | 64 soft values, 4 bits each, signed |
| `sbf_perm_net` | Tanner-graph wiring, both directions, derived from `H` |
| `sbf_vnpe` | one XOR per check node: parity of its variables' decisions |
| `sbf_check_mux`, `sbf_check_reg` | 32 check parities, held through the variable phase |
| `sbf_cnpe` | per variable: counts failed checks and picks flip direction and step |
| `sbf_addsub` | moves each soft value by the chosen step |
| `sbf_saturator` | clamps soft values to [-7, +7] |
| `sbf_pkg` | code matrix, its construction, default constants |

## One iteration in two cycles

Each iteration has two phases, and each phase takes one clock edge:

1. **Check phase.** The sign bit of every soft value goes through the
   permutation network to the four check nodes it belongs to. Each VNPE unit
   XORs its four inputs. The 32 results (1 = check failed) are written into the
   check node register.
2. **Variable phase.** The check parities go back through the network, two per
   variable node. The CNPE counts the failed ones; this count is the *flipping
   value*. The count picks a step, the add/sub unit applies it and the
   saturator clamps the result. The new value is written into the variable node
   register.

During the variable phase the check multiplexer feeds the check register's
output back into itself, so the parities stay stable.

## The flip rule

With `u` = number of failed checks of a bit (0, 1 or 2 for this code) and
`L` its soft value:

| flipping value `u` | action | change to `L` |
|---|---|---|
| `u >= 2` (`T_STRONG`) | strong flip | 4 toward the opposite sign |
| `u >= 1` (`T_WEAK`) | weak flip | 2 toward the opposite sign |
| `u = 0` | reinforce | 2 away from zero |

A check's message to one of its bits should leave that bit out (XOR of the
other three). That message contradicts the bit exactly when the full check
parity is 1. So counting failed checks is the same as counting contradicting
messages, and one parity bit per check serves all of the check's bits.

The result is clamped to [-7, +7]. A received 0 starts at +3 and a received 1
starts at -3. Every step is even and every start value is odd, so `L` is
always odd. It is never 0, and its sign is always a definite decision.

Consequences worth knowing when changing the constants:

* A bit whose two checks both fail flips in a single iteration (3 - 4 = -1).
* A bit with one failed check needs two consecutive weak flips (3 → 1 → -1).
  A bit that merely shares a check with a real error therefore survives one
  iteration of suspicion, and is pushed back up once that check is repaired.
* A single channel error in a codeword is always corrected in the first
  iteration. The code has no 4-cycles, so no other bit sees both of its checks
  fail.

The add/sub unit only needs the flip request and the current sign to choose
between adding and subtracting. Subtract for a flip of a positive value, or
for reinforcing a negative one; add otherwise. Its 7-bit result cannot
overflow before the clamp.

## The code

`sbf_pkg::H_DEFAULT` is a 32 × 64 regular parity-check matrix. Every bit is in
2 checks and every check covers 4 bits. It is a lifted version of this 4 × 8
base matrix (rows c1..c4, columns v1..v8):

```
c1: 0 1 0 1 1 0 0 1
c2: 1 1 1 0 0 1 0 0
c3: 0 0 1 0 0 1 1 1
c4: 1 0 0 1 1 0 1 0
```

Each 1 at base row `r`, column `c` (counted from 0) becomes an 8 × 8 identity
matrix rotated by `(r*(c+1)) mod 8`. Each 0 becomes an 8 × 8 zero block. The
rotation rule was chosen so that no two bits share two checks (the graph has no
4-cycles). Bit `n` of `yin`/`yout` is column `n`. The matrix is computed at
elaboration time by `expand_h()`, so there is no table file.

To use another code, pass any `H` (and the matching `N`, `M`) to `sbf`. The
permutation network, the node degrees and the flipping-value width all follow
from `H`. The helpers in `sbf_pkg` accept matrices of up to 32 × 64 entries;
raise `HFLAT_W` for larger ones. `tb_sbf_fig1` runs the decoder directly on
the 4 × 8 base matrix.

## Interface and timing

```
sbf (clk, rst, yin[63:0], yout[63:0])
```

There are no handshake signals; the frame rhythm is fixed from reset. Reset is
synchronous and active high.

```
edge after reset release:  1    2 3 4 5 6 7 8    9    10 ... 16   17
phase:                    load  C V C V C V C  V+load  C  ...  C  V+load
yin sampled:              F0                   F1                 F2
yout becomes:                                  dec(F0)            dec(F1)
```

* `yin` is sampled on edge 1 after reset is released, then on every 8th edge.
  Between those edges it is ignored.
* `yout` changes only on those same edges. It then holds the decoded previous
  frame for 8 cycles. It is 0 until the first frame is done.
* The decoder always runs exactly 4 iterations. It does not stop early when
  all checks pass.
* The last variable update of a frame goes straight to `yout` while the next
  word loads. Loading therefore costs no cycle, and the frame period is exactly
  4 iterations × 2 cycles.

Throughput is `rate × N × f_clk / (iterations × cycles per iteration)` =
0.5 × 64 × f / 8, i.e. 4 information bits per clock. For example, 1.13 Gbit/s at 283 MHz.

## Parameters (of `sbf`)

| Parameter | Default | Meaning |
|---|---|---|
| `N`, `M` | 64, 32 | code length, number of checks |
| `H` | `sbf_pkg::H_DEFAULT` | parity-check matrix, `H[m][n]` |
| `N_IT` | 4 | iterations per frame |
| `SOFT_W` | 4 | soft value width (signed) |
| `INIT_MAG` | 3 | start magnitude of a received bit |
| `LMAX` | 7 | clamp bound |
| `T_STRONG`, `T_WEAK` | 2, 1 | flipping-value thresholds |
| `P_STRONG`, `P_WEAK`, `P_KEEP` | 4, 2, 2 | steps |
| `POW_W` | 3 | step width |

After synthesis the default design has 356 flip-flop bits: 256 for the soft
values, 32 check, 64 output and 4 control. It has 130 port bits.

## What is specified and what is chosen here

This decoder follows a published architecture. That description gives the
following:

* the block list: add/sub, saturator, two multiplexers, variable and check
  node registers, VNPE, CNPE;
* the order of the blocks in the loop and the permutation network of the
  Tanner graph;
* 64-bit words, rate 1/2, the 4 × 8 example matrix and 4 iterations;
* a throughput formula whose figures give 2 cycles per iteration;
* a top level with only clock, reset and the two 64-bit buses.

It does not give the algorithm's arithmetic or the code. The following are
therefore this design's own:

* **The 64-bit parity-check matrix.** Only the 4 × 8 example was available.
  The lifting and its shift rule are described above.
* **Soft value format:** 4-bit signed, ±3 start, ±7 clamp.
* **Flipping value:** the count of failed checks. **Thresholds and steps:** the
  table above.
* **The sequencer and frame timing,** the overlap of load and last update, and
  the output register.
* **Register loading.** The original text calls the two node registers shift
  registers filled one bit per cycle. That cannot give two cycles per
  iteration, so here both registers load a whole word per edge. The
  throughput figure was given priority over that sentence.
* **Degree of parallelism.** The original is called partially parallel but
  does not say what is shared. Here all 32 check units and all 64 variable
  units work in the same cycle, which is what two cycles per iteration
  requires.

Decoding strength is modest. The code has column weight 2 and the decoder sees
hard inputs only. In the end-to-end test, every clean and single-error frame is
decoded correctly. With two random errors 62 of 80 frames came back as the sent codeword, and with three errors 25 of 80. No clock-rate claim is made: the RTL has not been placed or
timed.

## Simulation

Every module has a self-checking testbench in `tb/` named `tb_<module>`. Each
prints `TB_RESULT checks=<n> failures=<n>` and ends with `$finish`.
`tb/sbf_tb_pkg.sv` holds the reference models. It rebuilds the matrix
independently from the base rows, runs an integer model of the decoder, and
makes random codewords by Gaussian elimination over GF(2).

* `tb_sbf`: full size, default parameters. Decodes 400 back-to-back frames:
  clean codewords, 1 to 3 errors, and random words. It checks each output
  against the model, and checks that `yout` is stable between frame
  boundaries. It also checks that strong flips, weak flips, reinforcement,
  clamping at both bounds, sign changes, loads and outputs all occurred.
* `tb_sbf_fig1`: the decoder on the 4 × 8 example code, all 256 input words.
  The 32 codewords must pass unchanged.
* `tb_sbf_ctrl`: cycle-exact check of the phase sequence and the 8-cycle frame.
* The other testbenches cover the datapath blocks lane by lane.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sbf_pkg.sv tb/sbf_tb_pkg.sv tb/tb_sbf.sv --top-module tb_sbf
./obj_dir/Vtb_sbf
```

Replace `tb_sbf` with any other testbench name; `tb_sbf_fig1` does not need
`sbf_tb_pkg.sv`. Each run takes well under a second. Lint a module with
`verilator --lint-only -Wall rtl/sbf_pkg.sv rtl/<module>.sv -Irtl`. The only
remaining warnings are unused package constants, and the flipping value `fval`,
which the top level leaves unconnected. The output is kept because it makes the
CNPE observable in its own test.
