# MB-level rate controller for realtime video encoding

A video encoder sending over a constant-rate channel has to keep its output near the
channel rate, and it has to do so without looking ahead. This controller picks a
quantiser parameter (QP) and a coding mode for every macroblock (MB) while the frame is
being coded. Its only inputs are what the encoder already has: the mean absolute error
(MAE) that motion estimation finds for the MB, and the number of bits each coded MB used.
It needs no pre-analysis, no second pass and no frame-wide motion search. It also detects
scene cuts and forces intra coding around them, and it tells the encoder when frames
must be skipped because the buffer is overfull.

The algorithm and the architecture follow the published design *Hardware Oriented Rate
Control Algorithm and Implementation for Realtime Video Coding*. All arithmetic runs on a
single shared processing element (PE) with three adders, one multiplier and one divider.
A state machine feeds the PE from a register bank, one operation per clock cycle. The four
stages of the algorithm take 6, 9, 11 and 3 cycles. The micro-program, the fixed-point
formats, the bit widths, the model-update rule and several smaller rules are this
design's own; the section *Choices not fixed by the source* lists them.

## How the encoder uses it

The encoder calls the controller at four points. Each call is a one-cycle `start` pulse
with a `stage` code and that stage's inputs:

| when | `stage` | inputs read at `start` | cycles busy | results valid at `done` |
|---|---|---|---|---|
| start of a frame | `ST_FRAME` | `ftype` (I or P) | 6 | `target_bits`, `frame_qp` (I frames) |
| after motion estimation of an MB | `ST_MB` | `mae` | 9 | `qp`, `mb_intra` |
| after the MB is coded | `ST_UPD` | `mb_bits`, `hdr_bits` | 11 | `scene_change` |
| end of the frame | `ST_SKIP` | none | 3 | `n_skip`, `buffer_bits` |

`start` is taken on a rising edge while `busy` is low, and that edge also latches the
inputs. `busy` is then high for exactly the stage's cycle count. `done` pulses for one
cycle after that. A new `start` may come in the same cycle as `done`. Raising `start`
while `busy` is high is a protocol error and fails an assertion. After `ST_SKIP` the
encoder must drop the next `n_skip` source frames without calling the controller: the
buffer drain for those frames has already been accounted for.

An MB therefore costs 20 busy cycles plus two handshake cycles. A CIF frame (396 MBs)
costs about 8,700 cycles. At 40 MHz and 30 frames/s there are 1.33 million cycles per
frame, so the controller is idle almost all of the time.

`mae` is the per-pixel mean absolute error of the 16x16 luma block in Q4 (SAD / 16).
`mb_bits` counts all bits of the MB and `hdr_bits` counts its header and side bits.

## The algorithm as built

All symbols below are registers of the bank (`rc_pkg::reg_e`) or fields of `cfg`.
Fixed-point formats: `rho`, `alpha`, `kappa` and `SACC` are Q8 (256 = 1.0). MAE and
`theta` are Q4. `mu` is Q8. Shifts are arithmetic and divisions truncate.

### Frame layer: the frame's bit budget

- `alpha_v = rho_v * L / (rho_I + (L-1) * rho_P)` is the share of a GOP's bits that one
  frame of type v gets. L is the GOP length and `rho` are the relative weights of I and
  P frames.
- The initial target is `T^i = BR * alpha_v`, where `BR` is bits per frame
  (bitrate / frame rate).
- The buffer should follow a target fullness
  `B^f = B^i + BR * SACC`. `B^i` is one eighth of the buffer size. `SACC` is the running
  sum of `alpha - 1` over the frames already coded in this GOP. After a large I frame the
  target sits high, and it returns to `B^i` by the end of the GOP.
- Without a GOP structure (`gop_len = 0`), `alpha_v = rho_v` and `SACC` stays 0, so
  `B^f = B^i`. The encoder still chooses each frame's type.
- The frame target is `T^ = T^i - (B - B^f) / 4`, where `B` is the current fullness.
- For an I frame the whole frame gets one QP: `QP = QP_I + F(T^ / T_I)`. `QP_I` and `T_I`
  are the QP and bit count of the previous I frame. F is a step function:

  | kappa = T^/T_I | >= 4 | [2,4) | [1.5,2) | [1.25,1.5) | [0.875,1.25) | [0.75,0.875) | [0.625,0.75) | < 0.625 |
  |---|---|---|---|---|---|---|---|---|
  | F | -4 | -3 | -2 | -1 | 0 | +1 | +2 | +4 |

  F has no +3 step. The result is clipped to 1..31.
- The average MB MAE of the previous P frame is also formed here. The MB layer uses it.

### MB layer: QP and mode

P-frame MBs get their QP from the rate model `R = mu * MAE^2 / Q^2 + theta` (bits per MB,
Q the quantiser step). This model replaces the source variance of the classical
Lagrangian solution with the motion-estimation MAE. Minimising distortion under the
remaining budget gives

    Q^2 = mu * MAE_i * S / (T_r - theta * N_r),   S = MAE_i + (N_r - 1) * avgMAE_prev

`T_r` is the budget left in the frame and `N_r` is the number of MBs left. The MAE of MBs
not yet examined is unknown, so the previous frame's average stands in for it. Because of
this, motion estimation can run MB by MB and need not cover the whole frame first.

`rc_qp_from_qsq` turns `Q^2` into a QP. With the H.263 step `Q = 2*QP`, the QP is the one
whose step is nearest to `sqrt(Q^2)`. It is found by comparing `Q^2` with the thirty
squared midpoints `(2k+1)^2`. If the budget is used up (divisor <= 0), the division
saturates and the QP becomes 31.

The QP chosen depends on the MB:

- MBs of I frames use the frame QP.
- MBs forced intra by a scene change use `QP_I + 2`, clipped to 31.
- All other P-frame MBs use the model QP.

An MB is coded intra if the frame is an I frame, if a scene change forces it, or if its
MAE is above `cfg.mae_intra_th`.

### Update: after each coded MB

- `B`, the frame's bit count and the remaining budget are updated with `mb_bits`.
- The MAE sum of the frame is updated.
- The MB counter is updated, and so is the intra MB counter if the MB lies in row k.
- After the last MB of a frame, `SACC` grows by `alpha - 1`.
- For inter MBs of P frames with MAE > 0 the model follows the measurements:
  - `theta <- theta + (hdr_bits - theta) / 8`
  - `mu_i = (mb_bits - hdr_bits) * Q^2 / MAE^2`
  - `mu <- mu + (mu_i - mu) / 8`

### Scene changes

A cut shows up as many intra MBs, because motion estimation finds no match. The test
uses row k, with `k = floor(SR / 16) + 1`, where SR is the search range. Under downward
global motion, the MBs of the rows above row k can have their reference outside the
picture and turn intra without any cut. Row k is the first row that always finds its
reference inside the picture. The controller counts the intra MBs of row k. After the last
MB of that row, if their share of the row exceeds `tau` (Q8), the frame is a
scene change frame. Then:

- the rest of the frame and the first k rows of the next frame are forced intra;
- no test is taken in the next frame, so two scene changes cannot follow each other;
- forced MBs are coded with `QP_I + 2`, because the model's QP rests on the old scene;
- at the end of the frame, `QP_I <- clip(QP_I + 2 + F(T^ / frame bits))` and
  `T_I <- T^`. The I-frame reference then reflects the new scene.

The test is not taken in I frames. The flags are in `rc_scd`.

### Frame skip: end of frame

The channel drains `BR` bits per frame. If the buffer is still above its size after the
drain, `n_skip = ceil((B - BR - size) / BR)` frames are skipped, and `BR` more bits are
drained for each. `B` never goes below zero. Also at the end of the frame:

- an I frame stores its QP and bit count as `QP_I` and `T_I`;
- a P frame stores its MAE sum for the next frame's average.

## The shared PE and its micro-program

This is the part that is least obvious from the outside. The PE (`rc_pe`) is a chain of
units evaluated within one cycle:

    s1 = a +/- b
    p  = ((sq ? s1 : c) * s1) >>> msh        full 96-bit product
    s2 = p + d | p - d | d - p
    q  = div ? (s2 <<< dsh) / e : s2 >>> dsh
    g  = q | F(q) | sqrtQP(q)
    r  = clamp(g +/- f)                      none, at zero, or to 1..31

The six operands come from the register bank (`rc_rbank`). An operand code below 32 names
one of the 24 registers. The other codes name a constant (0, 1, an immediate) or a
configuration value. Some configuration values are derived: rho of the current frame
type, `B^i/4`, `k * MBs per row`, and `QP_I + 2`.

Each micro-instruction (`rc_pkg::uinstr_t`) holds:

- the PE setting;
- up to two destinations for the PE result, under one condition;
- two independent register moves, each with its own condition;
- side actions: mode decision, intra count, MB count, scene change test.

The conditions are frame type, forced intra, model update allowed, last MB, scene change
frame, and the PE's sign flags.

`rc_ucode_rom` holds the four programs. Its header comment lists each step's operation.
For example, MB-layer steps 0-3 compute `T_r - N_r*theta`, then `S`, then `mu*MAE`, and
finally the clipped QP of the quantiser equation in one divide-and-root step. The
schedules are shorter than the stage lengths in places: MB steps 6-8 are no-ops. They are
kept so that every stage takes its fixed length and the encoder's schedule is simple. To
change an operation, edit the step in `rc_ucode_rom` and the matching line of the
reference model in `tb/tb_rc_top.sv`.

Operands are read, computed and written back within one cycle. There are no pipeline
registers between the bank and the PE. A step can therefore use the result of the step
before it without any hazard logic. The cost is a long combinational path: a 48x48
multiplier followed by a 48-bit divider. At 40 MHz this would have to be pipelined or
turned into an iterative divider in a real implementation.

## Configuration (`cfg`, type `rc_cfg_t`)

| field | meaning |
|---|---|
| `br` | target bits per frame (bitrate / frame rate) |
| `gop_len` | L, distance between I frames (1 gives all-I coding, 0 means no GOP structure) |
| `rho_i`, `rho_p` | relative frame weights, Q8 (for example 768 and 256) |
| `buf_size` | buffer size in bits; `B^i` = size / 8 |
| `n_mb`, `mb_w` | MBs per frame and per row (CIF: 396 and 22) |
| `search_range` | ME search range in pixels, sets k |
| `tau` | intra share above which a scene change is declared, Q8 |
| `mae_intra_th` | MAE above which an MB is coded intra, Q4 |
| `init_mu`, `init_theta`, `init_qpi`, `init_ti`, `init_smae` | model values loaded at reset |

`cfg` must stay constant while frames are being coded. Reset is synchronous and active
high. The package parameter `rc_pkg::DW` (48) sets the width of every register and of the
PE.

## Choices not fixed by the source

The source fixes the equations above, the stage lengths, the three-adder, one-multiplier,
one-divider PE, the split into model and statistics registers, and the scene change rules.
It does not fix the following, which are this design's own choices:

- the data width (48 bits) and every fixed-point format;
- the order of the units in the PE, and the single-cycle evaluation without the operand
  registers that the architecture drawing shows;
- the micro-program schedules, the instruction format and the handshake;
- the square root as a comparator ladder on `Q^2`;
- the model-update rule (first-order averaging with weight 1/8) and using only inter MBs
  of P frames for it;
- the mode decision by an MAE threshold;
- the form of the quantiser equation over the remaining MBs and the remaining budget;
- the frame skip rule;
- how the scene change frame updates `QP_I` and `T_I`;
- the reset values.

Two further points where the design departs from or narrows the source:

- B frames are not supported. They would need a second set of model registers.
- The direct, unshared mapping of the four stages is not built. It exists only as the
  larger alternative to this architecture.

## Files

- `rtl/rc_pkg.sv`: types, register map, operand codes, instruction and configuration
  formats.
- `rtl/rc_top.sv`: top level.
- `rtl/rc_ctrl.sv`, `rtl/rc_ucode_rom.sv`: state machine and micro-program.
- `rtl/rc_pe.sv`, `rtl/rc_kappa_dqp.sv`, `rtl/rc_qp_from_qsq.sv`: processing element and
  its two tables.
- `rtl/rc_rbank.sv`: register bank.
- `rtl/rc_scd.sv`: scene change state.
- `tb/tb_<module>.sv`: one self-checking testbench per module.

## Verification and simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops on a cycle-count
watchdog. `tb_rc_top` runs the controller at its default size (CIF, 396 MBs) against a
closed-loop encoder model. It covers 48 source frames with GOP length 12 and two scene
cuts. After the first cut, the next coded frame is also badly predicted, so its scene
change test must be suppressed. A reference model in the testbench, written from the
equations above, predicts every output: frame target, I-frame QP, every MB's QP and mode,
skip count, buffer fullness, `QP_I` and `mu`. The testbench also checks every stage's
cycle count. It counts the mechanisms it exercises and fails if any never happens:

- an I-frame QP change;
- a model-derived QP;
- a forced intra MB;
- a scene change;
- a suppressed second detection;
- a frame skip;
- a threshold intra MB;
- a new GOP.

A second run of 12 frames with `gop_len = 0` checks the same outputs without a GOP
structure. It also checks that `SACC` stays 0.

The other testbenches test the blocks on their own: exhaustive sweeps of both tables,
20,000 random PE configurations against an integer model, and directed tests of the bank,
the state machine, the micro-program and the scene change rules.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/rc_pkg.sv tb/tb_rc_top.sv --top-module tb_rc_top -o sim
    ./obj_dir/sim

The end-to-end run takes under a second.

What the tests do not show: that the rate control performs as the source reports on real
sequences. The encoder model is synthetic. The tests show that the RTL computes the
algorithm described here, bit for bit.
