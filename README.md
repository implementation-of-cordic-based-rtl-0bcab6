# CORDIC sine/cosine processor

This processor computes the sine and cosine of an angle without a multiplier.
It uses CORDIC (COordinate Rotation DIgital Computer) in rotation mode. A unit
vector is turned towards the requested angle by a fixed sequence of
ever-smaller elementary rotations. Elementary rotation *i* turns the vector by
±atan(2^-i). Only its direction is chosen, and that choice makes the step a
shift and an add:

    anticlockwise:  x' = x - (y >>> i)   y' = y + (x >>> i)   t' = t + atan(2^-i)
    clockwise:      x' = x + (y >>> i)   y' = y - (x >>> i)   t' = t - atan(2^-i)

`t` is the angle turned so far. Each step compares `t` with the requested
angle and turns towards it. After *n* steps `x` and `y` are the cosine and
sine of the angle, each about one bit more accurate per step. Both are also
stretched by 1/K ≈ 1.6468. A last stage multiplies them by K = 0.6072529350,
using a fixed sum of shifted copies.

The RTL gives the processor in two forms, which stand side by side in the top
level `cordic_processor`:

* **Pipelined (unfolded)** – `cordic_pipelined`. It has one hardware stage per
  elementary rotation. Each stage has a fixed shift and a fixed angle, so its
  shifters are plain wiring. It accepts one angle per clock and returns one
  result per clock, with a latency of `N_ITER + 2` clocks.
* **Word-serial (folded)** – `cordic_word_serial`. It has a single rotation
  stage, which it uses `N_ITER` times per angle. It needs registers for x, y
  and t, two barrel shifters, a table of elementary angles and a small
  controller. One result takes `N_ITER + 2` clocks. It is much smaller, but its
  throughput is `N_ITER + 2` times lower.

## Number format

Angles, sines and cosines are signed 24-bit two's-complement numbers with 22
fraction bits (Q2.22). The value is the integer divided by 2^22, and angles
are in **radians**.

| angle | input (hex) | sin | cos |
|---|---|---|---|
| 0° | `000000` | `000000` | `400000` |
| 30° | `2182A4` | `200000` | `376CF6` |
| 45° | `3243F6` | `2D413C` | `2D413D` |
| 60° | `430548` | `376CF5` | `200001` |

Convert an angle as `trunc(deg · π/180 · 2^22)`. The results in the table are
exact values. The hardware lands within 2 LSB of them, about 5·10⁻⁷.

### Usable input range

The starting vector depends on the angle:

* up to 45°, the rotation starts from (1, 0) with t = 0;
* above 45°, it starts from (0, 1) with t = π/2.

The elementary rotations can add up to at most ±99.9°. The inputs that
converge therefore run from about **−99.9° to +114.6°**. The upper limit is the
largest number the format holds (2 rad). Angles below −99.9° give wrong
results, and nothing flags them. To cover the full circle, fold the angle into
this range before the processor and fix the signs afterwards.

## Datapath width and precision

Inside, x, y, t and the target angle are `W = DW + GUARD + 1` = 28 bits wide,
with `FRAC + GUARD` = 25 fraction bits:

* **GUARD = 3 extra fraction bits.** They absorb the truncation error of the
  22 arithmetic right-shifts.
* **One extra integer bit.** The accumulated angle `t` can reach
  π/2 + 1.74 rad ≈ 3.3, which would overflow a Q2 format.

The K multiplier rounds back to Q2.22. Over random angles in the usable range,
the worst error seen in simulation is 2 LSB.

The elementary angles and K come from one table in `cordic_pkg`: atan(2^-i)
and K, each scaled by 2^32 and rounded. Each block rounds the values it needs
to its own fraction width at elaboration. Changing `GUARD` or `FRAC` therefore
needs no new table. `N_ITER` may be at most 31.

K is the limit of ∏ 1/√(1+2^-2i). For `N_ITER` ≥ 12 it differs from the
finite product by less than one LSB. For much smaller `N_ITER` the results are
scaled slightly wrong.

## Modules (`rtl/`)

| module | role |
|---|---|
| `cordic_pkg` | master tables: atan(2^-i)·2^32, K·2^32, π/4, π/2; rounding functions |
| `cordic_atan_rom` | elementary-angle table, one entry per iteration, built at elaboration |
| `cordic_init_vector` | picks the starting vector (1,0)/t=0 or (0,1)/t=π/2; widens the angle |
| `cordic_microrot` | one elementary rotation; comparator, two shifters, three add/subtracts |
| `cordic_kscale` | multiplies by K as a sum of shifted copies, then rounds |
| `cordic_pipelined` | unfolded engine: init register, `N_ITER` rotation stages, K stage |
| `cordic_word_serial` | folded engine: one rotation stage, iteration counter, IDLE/ROTATE/SCALE controller |
| `cordic_processor` | top: both engines, each with its own ports |

### Pipelined engine timing

The valid bit enters with the angle and moves one stage per clock:

* the starting vector is registered on the first clock;
* rotation stage k is registered on clock k + 1;
* the K-scaled results are registered last.

`out_valid` rises `N_ITER + 2` = 24 clocks after `in_valid`. The engine has no
back-pressure. Reset clears only the valid bits.

### Word-serial engine timing

* **`start`** is accepted when `busy` is low. That clock loads the starting
  vector.
* **ROTATE** lasts `N_ITER` clocks, one elementary rotation per clock.
* **SCALE** is one clock. It writes `sin_o` and `cos_o` and pulses `done`.

`done` therefore comes 24 clocks after `start`. The outputs hold until the next
`done`, and a new `start` is accepted on the clock after `done`. A `start`
while `busy` is ignored. Two assertions check the controller:

* the iteration counter stays within the table;
* `done` occurs only on the return to IDLE.

### Top-level ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `p_in_valid`, `p_angle` | in | 1, 24 | pipelined engine input |
| `p_out_valid`, `p_sin`, `p_cos` | out | 1, 24, 24 | pipelined engine result |
| `s_start`, `s_angle` | in | 1, 24 | word-serial engine input |
| `s_busy`, `s_done`, `s_sin`, `s_cos` | out | 1, 1, 24, 24 | word-serial engine status and result |

If you need only one engine, tie the other one's inputs to zero and synthesis
removes it.

Parameters are the same on all engine modules:

| parameter | default | meaning |
|---|---|---|
| `DW` | 24 | width of the external words |
| `FRAC` | 22 | their fraction bits |
| `N_ITER` | 22 | number of elementary rotations |
| `GUARD` | 3 | extra internal fraction bits |

## Design choices and departures

**Taken from the described processor:**

* both architectures (unfolded pipelined and folded word-serial);
* the 24-bit angle format in radians with 22 fraction bits;
* the comparator scheme, which compares the accumulated angle with the input
  angle;
* the (1,0)/(0,1) starting-vector rule with its 45° threshold;
* the angle table, one entry per rotation;
* the final shift-and-add multiplication by K ≈ 0.60725.

**Choices of this implementation:**

* **Iterations.** The number of iterations (22) is this design's choice: one
  per fraction bit.
* **Datapath width.** The guard bits and the extra integer bit are this
  design's choices.
* **Registers and handshakes.**
  * Pipeline registers sit after every stage.
  * The pipelined engine uses a valid-bit handshake.
  * The word-serial engine uses `start`/`busy`/`done`.
  * Reset is synchronous.
* **Direction rule.** An equal comparison turns anticlockwise. The rule is
  always to turn towards the target. (A literal reading of some descriptions
  of this scheme swaps the two directions. That cannot converge.)
* **Angle unit.** Angles are in radians throughout. A 12-bit binary angle
  scale (180° = 2048) is another common convention for such processors. It is
  not used here.
* **Flip-flop count.** The pipeline carries the input angle down every stage
  alongside x, y and t, because each stage compares against it. The pipelined
  engine therefore holds about 2650 flip-flops at the defaults. A reference
  FPGA build of this processor reported 745 flip-flops, so that build must
  have used narrower words or fewer registered stages. Which of the two is
  unknown.

## Verification (`tb/`)

Every module has a self-checking testbench. Each one:

* compares against floating-point values computed independently of the RTL;
* has a watchdog;
* ends by printing `TB_RESULT checks=N failures=M`.

The shared reference functions are in `tb/cordic_tb_pkg.sv`.

| testbench | checks |
|---|---|
| `tb_cordic_atan_rom` | every table entry against atan(2^-i) (≤ 0.5 LSB) |
| `tb_cordic_microrot` | 2000 random rotations against floor-division arithmetic; both directions and the equal case |
| `tb_cordic_init_vector` | the 45° threshold (one LSB either side), random angles |
| `tb_cordic_kscale` | random and edge inputs against v·K (≤ 1 LSB) |
| `tb_cordic_pipelined` | 308 angles streamed mostly back to back; exact 24-clock latency, order, accuracy ≤ 6 LSB |
| `tb_cordic_word_serial` | 107 angles; exact latency, `busy`, held outputs, ignored `start` while busy |
| `tb_cordic_processor` | end to end at default parameters, see below |
| `tb_cordic_reference_angles` | 0°, 30°, 45°, 60° on both engines against previously published results of this processor (within 8 LSB) and the exact values (within 2 LSB) |

`tb_cordic_processor` runs 206 angles through both engines at the default
parameters. The angles include 0°, 30°, 45° and 60°. For each result it checks:

* accuracy against floating point;
* latency;
* agreement between the two engines.

It also counts how often each mechanism occurred and fails if any count is
zero:

* pipelined results on consecutive clocks;
* bubbles in the pipelined stream;
* both starting vectors, on both engines;
* a `start` to the busy word-serial engine;
* both rotation directions.

To simulate with Verilator (5.x) from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/cordic_pkg.sv tb/cordic_tb_pkg.sv tb/tb_cordic_processor.sv \
        --top-module tb_cordic_processor -Mdir obj_dir
    ./obj_dir/Vtb_cordic_processor

Replace the testbench name to run any other test. Each one finishes in well
under a second.
