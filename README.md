# Incremental PID controller: multiplier datapath and distributed arithmetic

A PID controller normally computes its output from the whole error history.
The *incremental* (velocity) form needs only the last output and the last
three errors:

    u[n] = u[n-1] + k0·e[n] + k1·e[n-1] + k2·e[n-2]
    k0 = kp + ki + kd,   k1 = -kp - 2·kd,   k2 = kd
    e[n] = Pd - P,       P = a[n] · s

where `a[n]` is the 8-bit ADC reading of the controlled quantity, `s` the
ADC step size (so `P` is the measured position), and `Pd` the set point.

This repository holds two hardware implementations of that law:

* **`conv_pid`** builds it directly: one multiplier for `a·s`, three
  multipliers for the gains, a tree of adders, a limiter, and registers for
  the error history and the previous output. One control period takes one
  clock.
* **`da_pid`** builds it without multipliers, with **distributed
  arithmetic (DA)**. Every product becomes a table lookup plus a
  shift-and-add, carried out one bit per clock. One control period takes
  8 + 24 + 3 = 35 clocks.

`pid_top` places both side by side on the same inputs. With the output
limiter of the conventional controller set wide, the two produce
bit-identical outputs. No arithmetic step in either one rounds.

## Number formats

Everything is two's-complement fixed point. The defaults are in `rtl/pid_pkg.sv`.

| signal | width | fraction bits | notes |
|---|---|---|---|
| `a` (ADC word) | 8 | 0 | unsigned |
| `step` (s) | 12 | 8 | unsigned; 256 means 1.0 |
| `P = a·s` | 20 | 8 | unsigned |
| `pd`, `e` | 24 | 8 | signed |
| `k0, k1, k2` | 16 | 8 | signed |
| `u` | 48 | 16 | signed. `outputi` = bits 47..16, `outputf` = bits 15..0 |

Only the 8-bit ADC width is given by the source design. The other widths
were chosen so that no step loses precision:

* A product of a gain and an error is 40 bits.
* A sum of three such products is 42 bits.
* The output has 6 bits of headroom above that.

`u` wraps if it leaves the 48-bit range. Every module takes these widths as
parameters.

The source gives the gains as kp, ki = kp·T/Ti and kd = kp·Td/T. The
controller takes the combined k0, k1 and k2 as inputs. Whoever sets the gains
computes them beforehand.

## The conventional controller (`conv_pid`)

The datapath is combinational, with four register groups around it:

    P     = a * s
    Pneg  = ~P + 1
    e[n]  = Pd + Pneg            fraction fields added first; their carry
                                 goes into the integer-field adder
    P0 = k0*e[n]   P1 = k1*reg1   P2 = k2*reg3
    S1 = P0 + P1   S2 = P2 + reg4
    u  = Bounded(S1 + S2)

On a clock edge where `ctrl` is high:

* `reg1 <= e[n]`
* `reg3 <= reg1`, which holds e[n-2] from then on
* `reg4 <= u`

The output is `reg4`. It therefore changes one clock after the strobe and
holds until the next strobe. Reset clears every register, so with Pd = 0 the
output stays at 0 and the actuator does not move.

`bounded` clamps the output to `[low_bound, up_bound]`. `reg4` stores the
clamped value. The next increment therefore starts from the limit, not from
an unbounded internal value, so the integral term cannot run past the limits
(anti-windup). The source does not say which value the register keeps; this
is a design choice.

## The distributed-arithmetic controller (`da_pid`)

### The idea

A sum of products `y = Σ A_k·x_k`, with constant coefficients `A_k` and
B-bit two's-complement inputs `x_k`, can be regrouped by bit position:

    y = Σ_b 2^b · ( Σ_k x_k[b]·A_k )  −  2^(B-1) · ( Σ_k x_k[B-1]·A_k )

The inner sum depends only on one bit of each input. With K inputs it can
take only 2^K values. DA therefore precomputes all 2^K partial sums into a
table (`dalut`). It then feeds bit b of every input in as the table address,
one bit position per clock. A **scaling accumulator** (`scaling_acc`) adds the
words up with the right powers of two. The table word for the sign bit is
subtracted instead of added.

The generic unit is `da_sop`. It holds:

* K serial registers (`psr`);
* one table of 2^K words (`dalut`);
* one scaling accumulator (`scaling_acc`).

Both passes of the controller are instances of it:

* the ADC side uses K = 1 with an unsigned input;
* the incremental side uses K = 3 with signed inputs.

### How the accumulator scales

Every clock the scaling accumulator computes

    acc <= acc·2^-1 ± word·2^(B-1)

After B clocks, fed LSB first, it holds `Σ word_b·2^b` exactly. The register
is B bits wider than a table word. Because of those extra bits, the right
shift never drops a bit, so the DA result equals the multiplier result bit
for bit.

### The two passes

**ADC side (`da_adc_side`).** This pass forms `P = a·s`.

* The ADC word sits in a parallel-in/serial-out register (`psr`).
* Each bit addresses a two-word table holding {0, s}.
* After 8 clocks the accumulator holds `a·s`.
* The ADC word is unsigned, so nothing is subtracted in this pass.

**Incremental side (`da_incr_side`).** This pass forms the increment and
updates the output.

* `e[n] = Pd − P` is formed and captured.
* Three PSRs are loaded with e[n], e[n-1] (`reg1`) and e[n-2] (`reg2`).
* Their bits address an eight-word table, with e[n] as the address MSB:

  | e[n] e[n-1] e[n-2] | word |
  |---|---|
  | 000 | 0 |
  | 001 | k2 |
  | 010 | k1 |
  | 011 | k1+k2 |
  | 100 | k0 |
  | 101 | k0+k2 |
  | 110 | k0+k1 |
  | 111 | k0+k1+k2 |

* After 24 clocks the accumulator holds `E = k0·e[n] + k1·e[n-1] + k2·e[n-2]`.
  The 24th clock carries the sign bits and subtracts.
* On the update clock:
  * `reg3 <= reg3 + E`
  * `reg1 <= e[n]`
  * `reg2 <= reg1`

The output is `reg3`.

### Sequencing and timing (`da_ctrl`)

| clock | state | action |
|---|---|---|
| 1 | IDLE, `start` high | load a[n] into the PSR, sample Pd, clear the accumulator |
| 2–9 | ADC | one bit of a[n] per clock |
| 10 | ERRLD | form e[n], load the three error PSRs, clear the accumulator |
| 11–34 | ERR | one bit of each error per clock; clock 34 subtracts |
| 35 | UPD | update u and the history; `done` high |

The new `u` appears on the clock after `done`. `busy` is high from clock 2
to clock 35. A `start` pulse while `busy` is high is ignored.

`coef_load` fills both tables in one clock from `step` and `k0..k2`. The
tables then keep their contents, so those inputs may change afterwards. An
assertion flags a `coef_load` during a running period. Reset clears the
tables as well, so reload them after every reset.

The two passes run one after the other and never overlap. The DA controller
has no output limiter: the source design gives one only for the
conventional datapath.

## Top level (`pid_top`)

The top has no parameters. One `start` input drives both `conv_pid.ctrl` and
`da_pid.start`, and the two controllers share every other input. Each
controller's outputs come out under its own prefix (`conv_`, `da_`).

The ADC, the controlled device and its sensor are outside the design:

* `a` comes in.
* `conv_u` and `da_u` go out.

Cost of the full top after coarse synthesis:

* 391 flip-flop bits.
* 168 bits of look-up table storage.
* Four multipliers, all in `conv_pid`.

## Where this design departs from, or adds to, the source design

* **Error sign.** One equation in the source reads `e = P − Pd`. Its block
  diagram, its two's-complement negation of P and its DA description all
  use `e = Pd − P`, and that is what is built.
* **Table word width.** The source describes the tables as "2^k × 1". A
  table word here is as wide as the sum it holds: 13 bits for LUT1 and 18
  bits for LUT2.
* **Accumulator feedback width.** The source's generic DA diagram feeds back
  one bit fewer than the word width, which truncates. Here the feedback is
  exact, as described above.
* **Design choices, not specified by the source:**
  * the number formats;
  * synchronous active-low reset;
  * how the tables are filled (`coef_load`);
  * the control sequence, its load and update clocks, and the
    `start`/`busy`/`done` handshake;
  * sampling a[n] and Pd at `start`;
  * `reg4` keeping the limited value.
* **Not built.** The ADC, the sensor and the plant.

## Simulating

Each module in `rtl/` has a self-checking testbench in `tb/`, named
`<module>_tb.sv`. Each testbench prints `TB_RESULT checks=N failures=M` and
stops itself after a fixed number of clocks. The testbenches compare against
a 64-bit integer reference model (`tb/pid_ref_pkg.sv`).

Example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/pid_pkg.sv tb/pid_ref_pkg.sv tb/pid_top_tb.sv --top-module pid_top_tb
    ./obj_dir/Vpid_top_tb

The files other modules need are found through `-Irtl -Itb`. The simulator
in this flow has two states only, so every register read by a testbench is
reset first.

`pid_top_tb` is the end-to-end test, and it runs at the default sizes:

* The conventional output drives `tb/plant_model.sv`, a first-order lag with
  an ideal 8-bit ADC. That model closes the loop.
* It runs 480 control periods over six set-point steps.
* Partway through it changes the gains and reloads the tables, and applies a
  reset.
* Every period it checks both controllers against the reference model and
  checks the 35-clock DA latency.
* It counts the upper-limit clips, lower-limit clips, negative and positive
  errors, table reloads and resets. Any of these that never happened counts
  as a failure.
* At the end, the loop must have settled within 2 ADC counts of the final
  set point.

The block testbenches cover:

* **`psr`:** bit order, hold and load priority.
* **`da_sop`:** a four-input sum of products, with signed and unsigned inputs.
* **`dalut`:** all eight words, including the extreme gains.
* **`scaling_acc`:** exact weighted sums with sign subtraction.
* **`bounded`:** both limits and pass-through.
* **`conv_pid`:** 2000 periods with random gains and narrow or wide bounds.
* **`da_ctrl`:** every strobe count and the latency.
* **`da_adc_side`:** `a·s`, including 255 × 4095.
* **`da_incr_side`:** E and the history for both error signs.
* **`da_pid`:** 300 periods, latency, and ignored `start` pulses.
