# Outphasing baseband: a signal component separator built from piece-wise-linear function units

An outphasing transmitter never amplifies a signal with a varying envelope.
It writes each complex baseband sample `s = I + jQ` as the sum of two vectors,
each with a constant length, and sends each vector through its own saturated
(and therefore efficient) power amplifier. Only the phases change. In the
*asymmetric multilevel* variant (AMO) each amplifier can also switch between
four supply levels `V1 < V2 < V3 < V4`. The two vectors can then have different
lengths `a1, a2`, and the pair `(a1, a2)` is picked so that it is just large
enough for the sample's amplitude. This keeps the outphasing angles small.

The digital part that finds the supply codes and the two phases is the
**signal component separator (SCS)**. For a sample with amplitude `A` and
phase `theta`, and a chosen supply pair, it computes:

```
theta  = atan2(Q, I)
alpha1 = arccos((a1^2 + A^2 - a2^2) / (2 A a1))      (law of cosines)
alpha2 = arccos((a2^2 + A^2 - a1^2) / (2 A a2))
phi1   = theta - alpha1,   phi2 = theta + alpha2
a1 e^{j phi1} + a2 e^{j phi2} = I + jQ
```

Doing this at several giga-samples per second needs a square root, a
reciprocal, an arctangent, an arccosine and the phase modulator's input
function `1/(1+tan(phi))`, all with about 12-bit accuracy. A direct look-up
table for a 15-bit function has 2^15 words, which is far too large when it
has to be built from registers. This design computes every nonlinear function
with one small fixed-point unit instead. That unit holds a 128-entry table of
line segments and needs one short subtractor and one short multiplier.

The RTL covers the whole baseband chain:

```
 3-bit I,Q    +-----------------+ 12-bit +----------------+ even 13-bit I,Q  +---------+
 64-QAM ----->| sym_predistorter|------->| shaping_filter |----------------->| amo_scs |--> a1,a2,quad,fphi (even)
 symbols      | 2^10 x 24 table |        | OSR 2 or 4,    | odd 13-bit I,Q   +---------+
              | 1-symbol memory |        | 2 samples/clk  |----------------->| amo_scs |--> a1,a2,quad,fphi (odd)
              +-----------------+        +----------------+                  +---------+
```

`baseband_top` takes one symbol per clock at oversampling 2, or one every
second clock at oversampling 4. Every clock it delivers two SCS results,
one from the even sample and one from the odd sample. The symbols come
either from the `sym_*` ports or from an on-chip PRBS generator.

Five blocks of a later, compensated version of the baseband are also
included. They sit beside the chain in `baseband_top`, each with its own
ports:

- `iq2phi` turns a Cartesian correction (dI, dQ) into phase corrections of
  the two paths.
- `comp_nonlinear` holds the nonlinear functions of one PA path: two
  complex functions (one per mode) of the present and previous phase,
  scaled by a factor linear in the present and previous amplitude.
- `comp_short_fir` is one of the complex short filters that shape the
  correction at twice the sample rate.
- `brickwall_fir` is the 100-tap decimating low-pass that the short filters
  share.
- `prbs_gen` is the on-chip symbol source.

How the compensator's results are combined and fed back into the phases
is not included (see the end of this file).

## The PWL function unit (`pwl_approx`)

This unit is the core of the design. Everything else is arithmetic around
it.

The input `x` (IN_W bits, a fraction in [0,1)) is split into two parts:

- its `M1 = 7` most significant bits, the interval index `i`;
- the remaining `M2 = IN_W - 7` bits, `x2`.

A table entry holds three numbers for each interval:

| field | width | meaning |
|---|---|---|
| `b_i` | 7 bits | the 7 MSBs of the output, the same format for every function |
| `k_i` | K_W bits, signed, KF fraction bits | slope of the segment in output LSBs per input LSB |
| `S_i` | S_W bits, signed, SF fraction bits | offset, in input LSBs |

The output is

```
y = b_i * 2^(OUT_W-7) + k_i * (x2 - S_i)
```

The trick is in `S_i`. A least-squares line through the interval has a real
intercept `b_i_real`. Rounding that intercept down to 7 bits leaves an error.
The error is moved into the offset: `S_i = (b_i - b_i_real) / k_i`. So the
multiplier only sees a `M2`-bit operand and a slope of about 10 bits, whatever
the output width is. The storage is `(7 + K_W + S_W) * 2^7` bits rather than
`OUT_W * 2^IN_W`.

Pipeline: stage 1 reads the table and forms `x2 - S_i` (with SF fraction bits).
Stage 2 multiplies, rounds away `KF + SF` fraction bits, adds the aligned
`b_i` and saturates to `[0, 2^OUT_W - 1]`. The latency is 2 cycles, with one
result per clock.

The testbench package shows how a table is made (`pwl_fit` in
`tb/scs_tb_pkg.sv`):

1. Fit a least-squares line to `f` over each interval.
2. Floor its value at the interval start to 7 bits to get `b_i`.
3. Round the slope to K_W bits with KF fraction bits to get `k_i`.
4. Round `(b_i - b_real) / k_i` to SF fraction bits to get `S_i`.

Every table is a register file written through the configuration port. The
same hardware can therefore hold any smooth function, including one that also
corrects a known static nonlinearity of the phase modulator.

The six instances in the SCS:

| function | x bits | y bits | k (bits/frac) | S (bits/frac) | word | y scale | max error seen |
|---|---|---|---|---|---|---|---|
| 1/(1+u), u in [0,1) | 11 | 16 | 10/2 | 12/4 | 29 | y = 1/(1+u), 2^16 = 1 | < 3 LSB |
| arctan(t)/(pi/4) | 12 | 12 | 10/7 | 11/3 | 28 | 2^12 = pi/4 | < 1 LSB |
| sqrt(m), m in [1/4,1) | 14 | 16 | 12/6 | 12/2 | 31 | 2^16 = 1 | < 2 LSB |
| 1/(2 sqrt(m)) | 14 | 16 | 12/6 | 12/2 | 31 | 2^16 = 1 | < 5 LSB |
| arccos(x)/(pi/2), x in [0,1) | 15 | 13 | 12/6 | 12/2 | 31 | 2^13 = pi/2 | < 3 LSB |
| 1/(1+tan(phi)), phi in [0,pi/2) | 13 | 10 | 10/10 | 11/3 | 28 | 2^10 = 1 | < 1 LSB |

These are the tolerances that `tb_pwl_approx` checks against the real
function. The only weak spot is arccos near 1, where its slope is unbounded.
Above |x| = 0.96 the 128-interval fit loses several LSBs.

## getTheta: atan2 without a divider (`get_theta`, 8 cycles)

`Q/I` is computed as `lo * (1/hi)`. Before each PWL unit the operands are
folded into a range where the function's slope is bounded:

1. **divPrep.** Take `|I|` and `|Q|` (12 bits, with `-1` saturating to 4095)
   and keep the signs. Swap them so that `lo <= hi`, and remember the swap.
   `lo == hi` (exactly 45 degrees) and `I = Q = 0` are flagged as special
   cases.
2. **normalise.** Shift `hi` left until its MSB is set, so that it lies in
   [1,2).
3. **1/x (2 cycles).** Compute `1/(1+u)` on the 11 fraction bits `u`.
4. **divPost.** Compute `t = lo * recip`, shifted back by the normalising
   shift. This gives `t = lo/hi` in [0,1) as 12 bits.
5. **arctan (2 cycles).** Compute `theta' = arctan(t)`, where one output LSB
   is `2*pi/2^15`.
6. **atanPost.** Undo the swap (`pi/2 - theta'`), then the sign fold into the
   right quadrant.

`|I|` and `|Q|` leave after stage 1, and `theta` leaves after stage 8. In
simulation `theta` is within 3 LSB of `atan2` (measured max 1.74 LSB).

## getAlpha: supply pair and outphasing angles (`get_alpha`, `amp_select`, 15 cycles)

**Supply selection.** `amp_select` compares `A^2` with seven programmable
thresholds. Normally these are the squared sums of neighbouring supply pairs:
`(2V1)^2, (V1+V2)^2, (2V2)^2, (V2+V3)^2, (2V3)^2, (V3+V4)^2, (2V4)^2`. The
region index `sel = 0..6` picks the pair `(V1,V1), (V1,V2), (V2,V2), ...,
(V4,V4)`. That is the smallest pair that can still reach `A`. The codes are
`a1 = sel/2` and `a2 = (sel+1)/2`. If `A^2` exceeds the last threshold, the
result stays `(V4,V4)` and the output `over` is raised.

**The arccos argument without a division.** The law-of-cosines argument is
rewritten as `c1*A + c2/A`, where `c1 = 1/(2 a_i)` and
`c2 = (a_i^2 - a_j^2)/(2 a_i)`. Fourteen constants are programmable: 7 pairs
times 2 paths, each 20-bit signed with value/2^14. So the only nonlinear
operations left are `sqrt` and `1/sqrt`:

- `A^2 = |I|^2 + |Q|^2` is 26 bits, value/2^24.
- **SqrtPrep:** shift `A^2` by two bits at a time into [1/4, 1), so that
  `m = A^2 * 4^j`.
- PWL units give `sqrt(m)` and `1/(2 sqrt(m))`.
- Post-shifts give `A` (Q2.14) and `1/A` (Q12.14).
- Four products, two sums, rounding to Q.15, and a clamp to [-1,1].
- For each path, the arccos PWL takes `|x|`. A negative argument gives
  `alpha = pi - arccos(|x|)`.

The datapath is 11 stages deep. Four more registers bring it to 15 cycles, so
that it lines up with getTheta in the SCS. The codes `a1`, `a2` and `over`
travel along with it. In simulation alpha is within 8 LSB (of 2^15 per turn)
for |argument| < 0.95.

## getPhi: phases for the phase modulator (`get_phi`, 4 cycles)

This block forms `phi1 = theta - alpha1` and `phi2 = theta + alpha2` modulo
one turn. The two MSBs of each 15-bit angle are the quadrant `quad`. The
13 LSBs, an angle in [0, pi/2), go through the `1/(1+tan)` PWL unit, which
gives the 10-bit `fphi`. So each path leaves the SCS with a 12-bit phase code
(2-bit quadrant and 10-bit fphi). `f(0) = 1` saturates to 1023/1024.

## The SCS pipeline (`amo_scs`, 20 cycles)

```
I,Q --> get_theta --theta (8 clk)--> 8-stage delay ---------------> get_phi (4 clk) --> fphi1/2, quad1/2
            |                                                          ^
            +--|I|,|Q| (1 clk)--> get_alpha (15 clk) --alpha1/2------+
                                            --a1,a2,over--> 4-stage delay --> a1, a2, over
```

`theta` is ready after 8 cycles and waits 8 more. `alpha` is ready 1 + 15 =
16 cycles after the input. `get_phi` adds 4, so a sample entering at edge `k`
leaves at edge `k + 20` with `out_valid` set. The datapath takes one sample
per clock and never stalls.

## Supporting blocks

**`sym_predistorter`.** A 1024 x 24-bit register table maps a symbol
(3-bit I and Q level indices) to 12-bit I and Q values (value/2^11). The
address is `{prev_i[2:1], prev_q[2:1], sym_i, sym_q}`, so each entry can
depend on the previous symbol. The read is combinational. The memory
advances when the filter accepts a symbol, and reset clears it.

**`shaping_filter`.** A polyphase interpolating FIR with NTAP = 8 symbol taps
per phase. It has 4 x 8 programmable coefficients (14-bit, value/2^12), and
its output is 13-bit (value/2^12), rounded and saturated.

- At `osr4 = 0` (OSR 2) it takes one symbol per clock and emits phases 0 and 1.
- At `osr4 = 1` (OSR 4) it emits phases 0,1 and then 2,3 in the next clock.
  `in_ready` is low in that second clock.

A symbol accepted at edge `k` gives its first pair at edge `k + 2`. Through
the SCS, the whole top therefore has a latency of `k + 22`.

## Configuration port

The top and each block have one write-only port `cfg` of type `cfg_wr_t`,
declared in `rtl/scs_pkg.sv`. It carries `{we, sel, addr[9:0], data[31:0]}`.
`sel` picks the target:

| sel | target | addresses | data |
|---|---|---|---|
| CFG_RECIP, CFG_ATAN, CFG_SQRT, CFG_ISQRT, CFG_ACOS, CFG_FTAN | PWL tables | 0..127 | `{b, k, S}`, b in the MSBs |
| CFG_THRESH | supply thresholds | 0..6 | 26-bit, same scale as A^2 |
| CFG_C1, CFG_C2 | arccos constants | 2*sel + path | 20-bit signed |
| CFG_PREDIST | predistorter | 0..1023 | `{I[11:0], Q[11:0]}` |
| CFG_COEF | filter taps | phase*8 + tap | 14-bit signed |
| CFG_SIN | quarter-wave sine PWL (iq2phi) | 0..127 | `{b, k, S}` |
| CFG_INVA | `2^15/(2 pi V) * 2^6` per supply code (iq2phi) | 0..3 | 24-bit |
| CFG_FIR | brickwall FIR taps | 0..99 | 18-bit signed |
| CFG_SFIR | short complex FIR taps | 2k (real), 2k+1 (imaginary) | 18-bit signed |
| CFG_NL | nonlinear functions: b, kx, ky per cell; g coefficients | {mode, cell, part} | `{imag, real}` 16-bit each |

Both SCS copies get every write. None of the tables has a reset value, so
load them before use. `tb/scs_tb_pkg.sv` (`scs_cfg_item`) generates the full
SCS load sequence for supply levels 0.18/0.36/0.54/0.72, and `tb_baseband_top`
adds the predistorter and filter tables.

## Symbol source (`prbs_gen`)

With `prbs_sel = 1` the predistorter is fed from a 15-bit LFSR with
polynomial x^15 + x^14 + 1, instead of from the ports. The LFSR steps six
times per symbol taken, and its six newest bits give `{sym_i, sym_q}`. Since
gcd(6, 2^15-1) = 1, the symbol stream repeats only after 2^15-1 symbols. The
source always offers a symbol, so the filter's `sym_ready` alone paces it.
Reset loads the seed 0x7FFF.

## Phase-correction converter (`iq2phi`, 9 cycles)

A compensator that predicts the amplifier's error produces a correction
(dI, dQ) in Cartesian form. The modulators, however, take phases. The
two-path sum is `I + jQ = a1 e^{j phi1} + a2 e^{j phi2}`. Inverting its
Jacobian gives

```
dphi1 = (dI cos phi2 + dQ sin phi2) / (a1 sin(phi2 - phi1))
dphi2 = (dI cos phi1 + dQ sin phi1) / (a2 sin(phi1 - phi2))
```

The signs are chosen so that adding `dphi1`, `dphi2` moves the output by
`+(dI, dQ)`. The datapath is built from the same pieces as the SCS:

- **Sine and cosine.** All five values (cos and sin of both phases, and
  `sin(phi2 - phi1)`) come from a quarter-wave sine PWL table (`CFG_SIN`:
  13-bit in, 16-bit out). The inputs are folded by quadrant first.
- **The division.** `sin(phi2 - phi1)` is normalised to [1,2) and sent
  through the same 1/(1+u) table as getTheta, then shifted back.
- **Amplitude and scale.** `1/a` and the radian-to-code scale are one
  programmable factor per supply code: `g = 2^15/(2 pi V) * 2^6` (`CFG_INVA`).

The result saturates to +-(2^14 - 1), which is +-pi. Parallel phases
(`sin(phi2 - phi1) = 0`) have no solution: the outputs are 0 and `sing` is
raised. Inputs `d_i` and `d_q` are 16-bit with value/2^15.

## Compensator nonlinear functions (`comp_nonlinear`, 3 cycles)

The compensator models the amplifier error as a nonlinear map with one
sample of memory, followed by a linear filter. For one path the map is

```
F = g(a, a_d) * P(phi, phi_d),    g = c0 + c1*a + c2*a_d
```

Here `phi_d` and `a_d` are the phase and amplitude of the previous valid
sample. `P` is a smooth complex function of two angles. It is stored as
planar pieces on an 8 x 8 grid over `(phi, phi_d)`. The top 3 bits of each
angle pick the cell, and the low 12 bits (`dx`, `dy`) give the position
inside it:

```
P = b + kx * dx / 2^12 + ky * dy / 2^12      (b, kx, ky complex, per cell)
```

This is the two-dimensional form of the SCS's line-segment units. The
pieces are not forced to meet at the cell edges; that is left to the table
contents. Both modes are evaluated every sample, so the block gives two
complex (four real) outputs. Stage 1 registers the cell and offsets and
updates the delayed values. Stage 2 reads the table and evaluates `P` and
`g`. Stage 3 multiplies. Table values, `c0..c2` and the outputs are 16-bit
signed with value/2^14. `amp` is 16-bit unsigned with value/2^15. Table
layout (`CFG_NL`): address `{mode, cell, part}`. Parts 0, 1 and 2 are `b`,
`kx` and `ky`, each `{imag, real}`. Part 3 at cells 0, 1 and 2 holds
`c0, c1, c2`. The grid size, the planar form and all formats are this
design's own choices.

## Decimating brickwall FIR (`brickwall_fir`)

The compensator's correction filters have a response with jumps at +-pi,
which would need very long FIRs. The trick is in three steps:

1. Run the filters at twice the rate, on two-way interleaved samples.
2. Shape a response that is continuous at +-pi, using short filters.
3. Remove the upper half band with one shared linear-phase brickwall
   low-pass, and decimate by 2.

`comp_short_fir` is one filter of step 2. It works on complex samples, two
per clock (`x[2n]` and `x[2n+1]`), and produces both full-rate outputs

```
y[j] = sum_{k=0}^{7} h[k] x[j-k],   j = 2n, 2n+1
```

with complex taps, so each tap needs four real multiplications. The taps are
18-bit signed with value/2^16 (`CFG_SFIR`: real part at address 2k,
imaginary part at 2k+1). Samples are 16-bit. The outputs are registered one
edge after the pair is taken. The tap count of 8 is this design's choice;
the source calls the filters only "short".

`brickwall_fir` is step 3. Each clock it takes a pair `x[2m], x[2m+1]` and
computes only the output that survives decimation:

```
y[m] = sum_{k=0}^{99} h[k] x[2m+1-k]
```

That needs 100 multipliers per clock. The taps are 18-bit signed with
value/2^17 (`CFG_FIR`, addresses 0..99). Samples are 16-bit. The output is
registered one edge after the pair is taken, and it is rounded and
saturated.

## Number formats at a glance

| signal | bits | meaning |
|---|---|---|
| I, Q into the SCS | 13 signed | value/2^12 |
| abs I, abs Q | 12 | value/2^12 |
| theta, alpha, phi | 15 | 2^15 = 2*pi |
| A^2 | 26 | value/2^24 |
| a1, a2 | 2 | 0..3 = V1..V4 |
| fphi | 10 | 1/(1+tan(phi')) * 2^10 |
| quad | 2 | quadrant of phi |

## Where this design departs from its source

These parts follow the published SCS:

- the PWL formulation with a 2^7-entry table;
- the two-stage PWL pipeline;
- the getTheta / getAlpha / getPhi decomposition, with latencies 8, 15 and 4
  and 8- and 4-stage alignment delays;
- the port widths;
- the `c1*A + c2/A` rewrite and the two-bit SqrtPrep shift;
- the quadrant fold before `1/(1+tan)`;
- the 2^10 x 24 predistorter;
- oversampling 2 or 4 with two interleaved SCS copies.

These are this design's own choices:

- **b and the low part are added, not concatenated.** The published method
  concatenates the 7-bit `b_i` with the low part. Adding them (with rounding
  and saturation) stays correct when an interval's values cross a multiple
  of the 7-bit step. It costs a short adder.
- **Table widths.** The slope and offset widths are chosen per function. The
  words are 28-31 bits, where the published tables use 25-30 bits.
- **Single-edge interleaving.** The published filter produces its two samples
  on opposite clock edges. Here both come out on the rising edge, and both
  SCS copies run on the same edge. The rate is the same: two samples per
  clock.
- **Where the magnitudes are tapped.** `|I|,|Q|` leave getTheta after its
  first stage. This is the reading under which the 8-stage theta delay
  lines up with a 15-cycle getAlpha. The total SCS latency of 20 follows
  from it.
- **Internal choices.** These include the stage splits inside the three
  sub-blocks, all internal number formats, and getAlpha's 4 padding
  registers. They also include the special cases: 45 degrees, zero input,
  negative arccos arguments, and amplitude above the largest pair (`over`).
- **Interfaces.** The configuration port, the `sym_valid/sym_ready`
  handshake, `out_valid` and reset are this design's own.
- **Filter and predistorter details.** The 8-tap filter length, the filter
  coefficient format and the predistorter's memory addressing are assumed.
- **Compensator blocks.** The PRBS polynomial, all formats of
  `comp_nonlinear`, `iq2phi`, `comp_short_fir` and `brickwall_fir`, the
  8 x 8 planar grid of the nonlinear functions, the short-filter length, and
  the choice of which output phase the decimation keeps
  are assumed.
- **Sign in the phase-correction formula.** The published formula has the
  two denominators with `phi1 - phi2` and `phi2 - phi1` exchanged, which
  flips the sign of both corrections. This design follows the derivation,
  and its testbench checks that the corrected phases move the output by
  `+(dI, dQ)`.
- **Sign convention.** The two path angles use `phi1 = theta - alpha1` and
  `phi2 = theta + alpha2`. The mirror image gives the same transmitted
  vector.

Not included:

- **The compensator's wiring.** The way the nonlinear outputs feed the short
  complex FIRs, and the way the 32 real short-FIR outputs are combined into
  the four brickwall filters, are not described in enough detail to build.
  Neither is the enable that adds the phase corrections back to `phi1` and
  `phi2` ahead of `1/(1+tan(phi))`.
- **Only one instance of each compensator block.** The compensated baseband
  has nonlinear functions for both PAs, two short complex FIRs per PA and
  four `brickwall_fir` instances. This RTL has one of each, and they are not
  connected to each other.
- **The analog front end.** The phase modulator, the power amplifiers and
  their supply switches are analog. They connect to the `scs_out` ports.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. Each one also has a
cycle-count watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/scs_pkg.sv tb/scs_tb_pkg.sv \
    rtl/pipe_delay.sv rtl/pwl_approx.sv rtl/get_theta.sv rtl/amp_select.sv \
    rtl/get_alpha.sv rtl/get_phi.sv rtl/amo_scs.sv rtl/sym_predistorter.sv \
    rtl/shaping_filter.sv rtl/iq2phi.sv rtl/prbs_gen.sv rtl/brickwall_fir.sv \
    rtl/comp_short_fir.sv rtl/comp_nonlinear.sv \
    rtl/baseband_top.sv tb/tb_baseband_top.sv \
    --top-module tb_baseband_top -o sim && obj_dir/sim
```

For another block, swap in its testbench and top module.

| testbench | what it checks |
|---|---|
| `tb_pwl_approx` | all six function formats, bit-exact against an integer model, accuracy against the real function, 2-cycle latency |
| `tb_get_theta` | atan2 accuracy (including axes, diagonals, zero, full scale), 8-cycle latency |
| `tb_amp_select` | every threshold at, below and above, all 7 pairs, `over` |
| `tb_get_alpha` | alpha accuracy, supply codes, 15-cycle latency |
| `tb_get_phi` | quadrant flags and fphi, 4-cycle latency |
| `tb_amo_scs` | reconstructs `a1 e^{j phi1} + a2 e^{j phi2}` from the outputs and compares with I+jQ (rms error about 0.1% of rms signal), 20-cycle latency |
| `tb_sym_predistorter` | address formation and memory advance on accept, reset |
| `tb_shaping_filter` | bit-exact polyphase outputs at OSR 2 and OSR 4, rates, `in_ready` stalls, mode switch |
| `tb_prbs_gen` | bit-exact against a serial PRBS-15 model over more than one full period, hold while not advanced |
| `tb_iq2phi` | closed-form comparison, a check that the corrected phases move the output by (dI, dQ), singular and saturated cases, 9-cycle latency |
| `tb_brickwall_fir` | bit-exact against a model with random taps, saturation, and a half-band design that passes a low tone with gain 1 and suppresses a high one below 1% |
| `tb_comp_nonlinear` | bit-exact against a model with random tables (including the previous-valid-sample delay and saturation); planar test functions that the grid must reproduce to within 6 LSB, with a known amplitude factor; 3-cycle latency |
| `tb_comp_short_fir` | bit-exact against a model with random complex taps, saturation, and real and imaginary impulses on both phases that must return `h` and `j*h` |
| `tb_baseband_top` | whole chain at default sizes. Sends 64-QAM symbols through both oversampling modes and then from the PRBS source. Rebuilds the vector from both SCS copies and checks latency 22. Exercises the converter, both FIRs and the nonlinear functions through their own ports, bit-exact for the last three. Counts OSR-2 and OSR-4 outputs, filter stalls, memory-addressed predistorter entries, PRBS symbols, all 7 supply pairs, and converter singular and saturated cases. Fails if any of them never occurs |

`tb_baseband_top` runs the design at its default sizes in well under a
second.
