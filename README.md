# DCORDIC direct digital frequency synthesizer

This is a sine/cosine frequency synthesizer whose clock rate is set by one
full adder plus a few gates, whatever the word length. Each clock it adds a
programmable phase step to a phase accumulator. It rotates a constant vector
by that phase with the CORDIC algorithm and delivers cos and sin of the
phase. It has no ROM and no carry-propagate adder anywhere:

- every number is kept in carry-save form (a carry vector plus a sum vector);
- the angle is processed one digit per clock, most significant digit first,
  in a bit-level systolic array;
- the rotation directions are computed with the *differential* CORDIC
  (DCORDIC) recursion, which needs only absolute values, not signs of fully
  resolved numbers.

The price is latency (51 clocks at the default size), many flip-flops (about
3600 bits at the default size), and outputs left in carry-save form.

All arithmetic uses *normalized angles*: π rad = 1.0. A phase is a
fraction in [-1, 1), and wrapping around 2 is a full turn.

## The DCORDIC recursion

Conventional CORDIC rotates by ±atan(2^-i) in iteration i. The sign is
chosen from the sign of the remaining angle z_i, with z_{i+1} = z_i - σ_i·α_i.
Finding a sign needs the whole number, so an MSD-first digit pipeline stalls.
DCORDIC instead keeps the magnitude of the residual and a running sign:

    |ẑ_{i+1}| = | |ẑ_i| − α_i |        α_i = atan(2^-i)/π
    σ_{i+1}   = σ_i · σ̂_{i+1}          σ̂ = sign of (|ẑ_i| − α_i)

Subtracting a constant and taking an absolute value can both be done MSD
first with an on-line delay of one digit. The sign σ̂ is known only when the
least significant digit has passed. So the rotation direction d_i = σ_i
comes out of the angle path two clocks after d_{i-1}, and the sine/cosine
datapath consumes it with the same skew.

## Timing: skew everywhere

Digit j of a word always travels one clock behind digit j-1. The phase
accumulator produces its output already skewed this way, so no skewing
registers are needed.

In the angle path, each iteration is a column pair:

- **CSA column** (`alpha_csa_column`): adds the constant −α_i. The sum is
  registered. The carry goes unregistered into the next more significant
  row, so it travels up one row per clock, which is the on-line delay of 1.
- **ABS column** (`abs_column`): its output is registered.

One iteration therefore costs two clocks. The sign state is passed down from
row to row through a register.

With R = AF + 2 rows (sign, AF fraction digits, one extra row), the sequence
at the default size is as follows:

| Stage | Clocks |
|---|---|
| Accumulator digit 0 of sample n | cycle n+1 |
| Angle mapping | 3 clocks, plus R−1 for the LSD to arrive |
| Each iteration | 2 clocks |
| Datapath | 2 pipeline stages per iteration, started by d_i |
| **Total latency** | AF + 2·N_ITER + 5 = **51 clocks** |

## Absolute value of a carry-save number that may have overflowed

A W-digit carry-save number (c_0 + s_0 weigh −1) spans [−2, 2). Only
[−1, 1) is a valid two's complement value, and the phase accumulator
deliberately overflows. The ABS cells therefore find the sign and the
absolute value of the *wrapped* value, one digit per clock, MSD first.

The sign is carried down the column as one of four states:

| State | Meaning |
|---|---|
| `MSD02` | all digits so far (after the MSD) are 1; the MSD was 0 or 2 |
| `MSD1` | all digits so far are 1; the MSD was 1 |
| `PLUS` | sign decided, positive |
| `MINUS` | sign decided, negative |

A digit here is c_j + s_j ∈ {0, 1, 2}.

- In `MSD02`, the first digit that is not 1 decides. Under a 0 MSD, a 2
  means the number overflowed and is negative, and a 0 means positive; under
  a 2 MSD it is the other way round.
- In `MSD1`, the number is in range, and the first digit that is not 1
  decides directly.
- Digits that arrive while the sign is still undecided are passed through.
  That is correct because |x| and x agree on them for either sign.
- Once the state is `MINUS`, each digit is negated by inverting both of its
  bits. Inverting a carry-save number subtracts it from −2 ulp, so the result
  still needs +2 ulp.

The LSD cell (`abs_lsd_cell`) ends the column. It resolves any undecided
sign, emits σ̂ and σ_out = σ_in XOR σ̂, and emits σ̃, a flag meaning "add
two ulps". The two ulps are not added by another column. The next CSA column
has an **extra LSD row** below the alpha precision. Its full adder takes σ̃
as a third input, and a second copy of σ̃ goes into the row's empty carry
slot. The correction therefore costs no extra clock.

Because α_i is a constant, every CSA row other than the LSD row is a half
adder (alpha bit 0) or a half adder that adds one more (alpha bit 1). There
is no angle table. α_i is computed at elaboration time from
`atan(2^-i)/π`, rounded to AF fraction bits (`dcordic_pkg::alpha_q`).

## Phase accumulator and frequency switching

The accumulator must emit its output MSD first and skewed, but a normal
accumulator feeds its own output back in parallel. The design uses a
recurrence that holds with skewed feedback:

    a[n] = a[n-2] + 2P

Each digit slice (`phase_acc_slice`) has:

- a feedback register for its own latched sum of two clocks earlier;
- a feedback register for the carry that the next less significant slice
  produced at that time;
- a full adder that adds the increment bit;
- a register holding the output sum.

The carry leaves the slice unregistered, so the output (carry, sum) is a
carry-save number whose digit j of sample n is valid in cycle n+j+1.

The recurrence only produces steps of P if two consecutive samples already
differ by P. `phase_inc_loader` sets this up with a load pulse that moves
down the rows one per clock:

- In the pulse's first clock, a row's increment register receives the digit
  of **P**.
- In the next clock it receives the digit of **2P** (P shifted left by one).
- During that second clock the row's feedback registers hold their value
  (enable low).

From reset (all zero) this yields 0, P, 2P, 3P, ... The same load during
operation switches the frequency on the fly, giving:

    ..., x+P0, x+2P0, [x+3P0 is skipped], x+2P0+P1, x+2P0+2P1, ...

One old-frequency sample is lost at each switch. There is no adder for P0+P1,
so switching adds no latency. `phase_inc` has PA_W−1 bits, and the output
frequency is `phase_inc / 2^PA_W` of the clock rate: below half the clock
rate, as sampling requires.

## Folding the angle into CORDIC's range (`angle_mapper`)

CORDIC converges only for |z| ≲ 0.55 (about 100°), but the accumulator
covers the full turn. The mapper runs an additional CORDIC-like step:

1. An ABS column gives u = |z| with sign σ0.
2. A CSA column with no alpha adds the two-ulp correction.
3. A second ABS column works only on the fraction digits of u. This is 2u
   taken modulo 2 and halved again, so it gives m = u or 1−u, with sign σ̂1.

The outputs are then:

- **d0** = σ0 XOR σ̂1, the direction of the first rotation;
- **negate** = σ̂1.

With these, cos(πz) = (−1)^negate · cos(πm) and
sin(πz) = (−1)^negate · sin(±πm). The datapath computes with m, and the
*user* applies the negate flag (see below).

Two phases are singular:

- **z = −1**: the first ABS column overflows to |−1| = −1.
- **z = −1/2**: doubling 1/2 overflows to −1.

In both cases the second ABS column's LSD cell sees an undecided sign and a
digit of value 2. When that happens the mapper forces the second sign to
negative. This gives cos = −1 at z = −1 and the correct sign of sine at
z = ±1/2. Both cases occur in every full sweep, and the testbenches check
them.

## Sine/cosine datapath

`xy_datapath` starts from the constant vector (1/K_n, 0). K_n is the CORDIC
gain after N_ITER iterations, and 1/K_n is rounded to DW bits, which is the
prescaling. N_ITER stages (`xy_stage`) follow, one per rotation direction.

- **Number format:** x and y are carry-save numbers with DW+2 digits: a
  guard digit, a sign digit and DW fraction digits. The guard digit absorbs
  the short excursions past ±1 that occur during rotation.
- **Adders:** each stage adds or subtracts the other coordinate shifted right
  by i, using two 3:2 carry-save adders per coordinate (`oc_csa`).
- **Subtraction:** done by inverting the operand and putting a one into the
  free carry slot.
- **Overflow-correcting MSD** (`oc_csa`): the most significant full adder
  uses two extra XORs. With them, each output vector stays a valid two's
  complement number and can be shifted right by sign extension.
- **Jamming:** the bits shifted out are dropped and the LSB of the shifted
  operand is forced to 1. This rounding is unbiased and needs no adder.
- **Pipelining:** two pipeline stages per iteration. The directions arrive
  two clocks apart, so each stage uses its d_i the moment it arrives. The
  negate flag is delayed to match.

## Using the top level (`dcordic_ddfs`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | clock; synchronous active-high reset clearing every register |
| `phase_inc` | in | PA_W−1 | phase step, unsigned, in units of 2^-(PA_W-1) (half turn = 1.0) |
| `load_phase_inc` | in | 1 | one-clock pulse: take `phase_inc` (off-line after reset, or on the fly) |
| `negate` | out | 1 | the true outputs are the negated x and y |
| `datapath_carry_x`, `datapath_sum_x` | out | DW+2 | cosine, carry-save |
| `datapath_carry_y`, `datapath_sum_y` | out | DW+2 | sine, carry-save |
| `angle_residue_carry`, `angle_residue_sum` | out | AF+2 | final residual angle, skewed, carry-save |

**Reading the outputs:**

- cos = ±(carry_x + sum_x) / 2^DW and sin = ±(carry_y + sum_y) / 2^DW.
  The sum is taken modulo 2^(DW+2) and read as signed, and the sign is minus
  when `negate` is 1.
- The carry-save form, the negation and any rounding to DAC width are left
  to the user. A carry-propagate adder and a conditional negation would
  follow here in a complete system.
- **Latency:** the output pair that appears after a clock edge belongs to
  the accumulator sample started AF + 2·N_ITER + 5 clocks earlier.
- **Frequency change:** after a load, the new step size first appears at the
  output AF + 2·N_ITER + 6 clocks after the edge that sampled
  `load_phase_inc`.
- **Loading rule:** do not issue a new load until the previous one has
  passed all PA_W rows (PA_W+1 clocks). An assertion in `phase_inc_loader`
  checks this.
- **Residue:** row j of the residue belongs to the same sample as row 0 and
  appears j clocks later. It is kept as a diagnostic: its magnitude stays
  within about α_{N−1}.

## Parameters and accuracy

| Parameter | Default | Meaning |
|---|---|---|
| `PA_W` | 15 | accumulator digits (angle resolution) |
| `N_ITER` | 15 | CORDIC iterations |
| `AF` | 16 | fraction bits of the α constants |
| `DW` | 17 | fraction bits of the datapath |

The defaults are the larger of two configurations that the design method
was sized for. That configuration targets about 90 dB SFDR; the smaller one
(12/10/11/10) targets about 60 dB.

The accuracy is measured as *effective bits*: −log2 of the largest length
of the (cos, sin) error vector, taken over every phase of a full turn
(phase step 1). SFDR is the distance from the tone to the largest other
spectral line, in dB. It is taken separately for the cosine and the sine
over 2^PA_W samples, at a step of 1 and at one even step, and the worse
value is shown. The small configuration comes out 2.5 dB under its target.

| Configuration (PA_W/N_ITER/AF/DW) | Reference value | Measured here |
|---|---|---|
| 15/15/16/17 (default) | ~90 dB SFDR | 12.22 effective bits, SFDR 97.6 dB |
| 12/10/11/10 | ~60 dB SFDR | 6.87 effective bits, SFDR 57.5 dB |
| 8/9/14/13 | 7.977 effective bits | 7.977 |
| 8/8/14/15 | 7.044 | 7.040 |
| 12/13/21/17 | 11.782 | 11.842 |
| 12/12/21/19 | 10.991 | 10.988 |
| 16/17/30/21 | 15.618 | 15.695 |

The iteration count bounds the result: with N_ITER iterations the angle
approximation alone limits it to about N_ITER−1 effective bits. The α and
datapath widths must exceed that by a few bits to get close to the bound.

At the default size, generic synthesis gives about 7300 cells and 3580
flip-flop bits, all in short paths of one full adder or a few gates.

## What follows the reference design and what is this design's own

The following come from the reference design:

- the DCORDIC recursion;
- the carry-save ABS algorithm, its sign decoder and the two-ulp extra row;
- half-adder α rows;
- the slice of the skewed phase accumulator with its hold-during-2P loading,
  and the on-the-fly switching sequence that loses one sample;
- angle folding with an extra ABS column, and detection of the singular
  phases from the LSD sign decoder's inputs;
- the guard digit, the overflow-correcting MSD adder, jamming, 1/K_n
  prescaling and two pipeline stages per datapath iteration;
- the port names of the top level and the default sizes.

The following are this design's own choices:

- **Load order.** One description of the loader loads 2P before P. This
  design loads P first, then 2P, which is what makes the recurrence step by
  P.
- **Singular-phase rule.** The rule applied once a singular phase is
  detected (force the folded sign negative) is this design's own.
- **Signal formats.** These are not given elsewhere and are chosen here:
  - the 2-bit coding of the four ABS sign states;
  - the phase increment width (one digit less than the accumulator);
  - synchronous reset;
  - taking the residue from the registered output of the last CSA column;
  - leaving the sine/cosine outputs (word-parallel) in carry-save form.
- **Angle resolution.** "b-bit angle resolution" is taken as a b-digit
  accumulator.

Not included: the DAC and the analog reconstruction filter that follow a
synthesizer, and output post-processing (carry resolution, negation,
dithering).

## Files

`rtl/` holds one module or package per file:

| File | Contents |
|---|---|
| `dcordic_pkg.sv` | sign-state type, π, α and 1/K_n computed at elaboration |
| `abs_cell.sv`, `abs_lsd_cell.sv` | ABS digit cells |
| `abs_column.sv` | ABS column with registered sign chain |
| `alpha_csa_column.sv` | CSA column with constant −α_i and the extra LSD row |
| `angle_mapper.sv` | folding into the convergence range, negate flag, singular phases |
| `dcordic_angle_path.sv` | mapper plus N_ITER iterations; emits d[], negate, residue |
| `phase_acc_slice.sv`, `online_phase_acc.sv`, `phase_inc_loader.sv` | phase accumulator and loader |
| `oc_csa.sv`, `xy_stage.sv`, `xy_datapath.sv` | sine/cosine datapath |
| `dcordic_ddfs.sv` | top level |

`tb/` holds one self-checking testbench per module, named `tb_<module>.sv`,
and two more:

- `tb_dcordic_ddfs.sv` is the end-to-end test at the default size. It runs
  all 32768 phases and two on-the-fly switches, including the largest
  increment. It checks every output against cos/sin, checks the exact
  latency and the residue bound, and counts the singular phases, wrap-arounds
  and negations.
- `tb_ddfs_workloads.sv` (with `ddfs_ebits_probe.sv`) runs the accuracy
  table above.

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. To run one with
Verilator:

    verilator --binary --timing -Irtl -Itb rtl/dcordic_pkg.sv tb/tb_dcordic_ddfs.sv \
        --top-module tb_dcordic_ddfs -o sim
    ./obj_dir/sim

The default-size end-to-end run takes well under a second of simulation
time. The workload run takes about half a minute, most of it compilation.
