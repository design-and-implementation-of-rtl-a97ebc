# Radix-4 complex divider with operand prescaling

This unit computes the complex quotient q = z / d of two fixed-point complex
numbers with a digit recurrence. Each clock it produces one radix-4 digit of
the real part and one of the imaginary part. The digits lie in {-3, ..., 3}.

The hard part of complex division by digit recurrence is choosing the digits.
The real and imaginary digits must be picked together so that both residuals
stay bounded, which is a two-dimensional problem. This design avoids it by
**prescaling**. A small table gives K ≈ 1/d. The dividend and divisor are
multiplied by K, and the unit then divides x = Kz by y = Kd. Now y ≈ 1 + 0i.
The real digit depends only on the real residual and the imaginary digit only
on the imaginary residual. Each digit is found by rounding a short estimate of
its shifted residual to the nearest integer, as in real-valued SRT division.

The structure, widths and cycle budget follow the radix-4 complex divider of
Dormiani, Ercegovac and Muller (ASAP 2009): a 36-bit unit with one
prescaling table of 2K words of 16 bits. The section
"Departures and open points" lists every place where this RTL differs from
that design or fills in something it leaves open.

## The algorithm

With y = Kd and x = Kz, the residual w starts at w[0] = x. Each iteration
does the following:

    q_{j+1}^R = round(est(4 w^R[j]))        q_{j+1}^I = round(est(4 w^I[j]))
    w^R[j+1]  = 4 w^R[j] - q^R y^R + q^I y^I
    w^I[j+1]  = 4 w^I[j] - q^I y^R - q^R y^I

The quotient is 0.q1 q2 ... qn in each component, read in radix 4.

Rounding can only keep the digits in {-3..3} when two conditions hold:

* the residual stays within ||w||∞ ≤ ¼(3 + ½ + 2^-σ) = 57/64, with σ = 4
  fractional bits in the estimate;
* the prescaling error satisfies 6·ε_s + ½ + 2^-σ ≤ 57/64, so
  ||Kd − 1||∞ < 7/128 ≈ 0.055.

The table is addressed by d rounded to 6 fractional bits (q = 6). Its entries
are rounded to 6 fractional bits (t = 6). With these sizes the worst
||Kd − 1||∞ over 200,000 random divisors is about 0.023, well under that
limit. The tests check the
limit for every divisor they use.

These conditions also limit the operands:

* divisor: 1/2 ≤ max(|d^R|, |d^I|) < 1;
* dividend: max(|z^R|, |z^I|) ≤ 57/256. Since |K| ≤ 2 component-wise, this
  keeps x = Kz within 57/64.

The real requirement is ||Kz||∞ ≤ 57/64. Larger dividends therefore work
when d is close to 1.

## Interface and timing (`cdiv_top`)

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; asynchronous active-low reset (controller only) |
| `start` | 1 | accepted when the unit is idle or in its `done` cycle; latches all four operands |
| `z_re`, `z_im`, `d_re`, `d_im` | N | two's complement, N−1 fractional bits (value = integer / 2^(N−1)) |
| `busy` | 1 | operation in progress |
| `done` | 1 | one-cycle pulse; `q_re`/`q_im` are valid from this cycle until the next start |
| `q_re`, `q_im` | 2·ITERS+1 | two's complement, 2·ITERS fractional bits |

The parameters default to N = 36 and ITERS = 16. An operation runs in fixed
phases. Clock k is the clock period that follows the k-th rising edge,
counting the edge that samples `start` as edge 1:

| clocks | phase | what happens |
|---|---|---|
| 1–3 | look-up | the reciprocal ROM is read; `en_pres` in clock 3 stores K |
| 4–7 | scale z | the shared multiplier forms Kz; `en_sc` in clock 7 stores x |
| 8–11 | scale d | x is copied into both residuals (`init_res`, clock 8); the multiplier forms Kd; `en_sc` in clock 11 stores y |
| 12–27 | iterate | one digit pair per clock, converted on the fly |
| 28 | done | `done` is high, 27 edges after the start edge |

The latency is 3 + 2·4 + ITERS = 27 clocks. The look-up and the multipliers
get 3 and 4 clocks because they are multi-cycle paths behind clock enables.
A timing constraint for the implementation tool should declare them so. The
iteration loop is the single-cycle critical path.

For each component the quotient is within about 1.4·4^-ITERS of x/y.
Truncating x and y to N−1 fractional bits adds a few units of 2^-(N−1). The
tests accept 3·4^-ITERS + 8·2^-(N−1).

## Prescaling

### Reciprocal look-up (`prescale_lookup`, `recip_rom`)

1. **Round and fold.** Each divisor component is rounded to 6 fractional
   bits. This gives 8 bits, from −1 to +1 inclusive. Then its magnitude is
   taken.
2. **Pick the large component.** Because ||d||∞ ≥ ½, at least one magnitude
   has its 2^-1 bit set. Call that component a and the other b. The table is
   indexed by {a2..a6, b1..b6}, which is 11 address bits instead of 12. The
   real component is used as a when its 2^-1 bit is set. Otherwise the
   imaginary component is used, and this counts as "swapped".
3. **Read the table.** Each 16-bit word holds two 8-bit magnitudes, 2 integer
   and 6 fractional bits each:

       hi = rnd(a/(a²+b²), 6)     lo = rnd(b/(a²+b²), 6)

   In the normal case |K^R| = hi and |K^I| = lo. When swapped, the two halves
   are crossed.
4. **Handle ±1.** A magnitude that rounded to exactly 1 has no 2^-1 bit, so
   it cannot use the main table. If one component is ±1, a 64-word table
   ROM_s is addressed by the other magnitude. ROM_s holds the same formula
   with a = 1. If both components are ±1, both magnitudes are ½.
5. **Apply signs.** K = conj(d)/|d|². So K^R takes the sign of d^R, and K^I
   takes the opposite sign of d^I. The result has 9 bits: 3 integer and 6
   fractional.

The table contents are computed when the design is elaborated, with integer
arithmetic. With A = 64a and B = 64b:

    hi = floor((8192·A + A² + B²) / (2·(A² + B²)))

This is round-to-nearest with ties rounded up. It gives 2048 words for the
main ROM and 64 words for ROM_s. Both ROMs read synchronously, like a block
RAM.

### Shared complex multiplier (`prescaler`)

The four operands are held in input registers. K is held in its own
registers. A multiplexer (`sel_mul`) feeds either z or d to four real
multipliers (N × 9 bits) and two adders:

    P^R = A^R K^R − A^I K^I      P^I = A^R K^I + A^I K^R

The output registers (`en_sc`) first hold x. The residuals copy x from there.
Then the same registers are overwritten with y, which stays for the
iterations. Products are truncated to N−1 fractional bits. The outputs have
N+1 bits because y^R can exceed 1.

## The recurrence (`recurrence`)

Two instances run side by side, one with `IMAG = 0` and one with `IMAG = 1`.
Each computes w ← 4w + σ1·y^R + σ2·y^I:

* real instance: σ1 = −q^R and σ2 = +q^I;
* imaginary instance: σ1 = −q^I and σ2 = −q^R.

Each instance sends its own digit to the other.

### Residual format

The residual is held in carry-save form, a sum vector `ws` and a carry
vector `wc`, N bits each. Position 0 has weight 1 and position N−1 has weight
2^-(N−1).

All arithmetic is modulo 2. Because |w| ≤ 57/64, one integer bit is enough.
Bits of weight 2 and above are never formed, and carries out of position 0
are dropped. Multiplying by 4 is a shift by two positions.

### Digit selection (`digit_select`)

Bits 0..7 of `ws` and `wc` are taken as 4w, with 3 integer and 5 fractional
bits. They are added modulo 8 in an 8-bit carry-propagate adder, giving
g = g₋₂g₋₁g₀.g₁…g₅.

Truncating both vectors costs less than 2^-4 in total. So g is within 2^-4
of 4w, and it never wraps.

The digit is g rounded to the nearest integer. It is read from a table
indexed by g₋₂g₋₁g₀g₁ and g_z = g₂|g₃|g₄|g₅. The two rows with |g| ≥ 3.5
cannot be reached under the residual bound; they are saturated to ±3.

### Digit multiples (`mg`)

Each digit is split as σ = 2σ² + σ¹ with σ^i ∈ {−1, 0, 1}. For example,
3 = 2 + 1 and −2 = −2 + 0. The multiples σ¹y and 2σ²y are sent to the adder
as two vectors. A negative multiple is the bit-wise inverse, and its "+1" is
returned as a carry-in bit. The two generators of an instance therefore give
four vectors and four carry-ins.

### Reduction: where the shifted residual re-enters

This is the least obvious part of the design. A straightforward version
would add six vectors in a [6:2] carry-save adder: 4ws, 4wc and the four MG
vectors. This design instead reuses the selection adder's result g. The
top six bit positions of 4w already exist as one non-redundant vector there,
so they enter the adder as a single input. The new residual is formed in
three parts:

| positions of w[j+1] | adder | inputs |
|---|---|---|
| 6 … N−1 | `csa62`, a [6:2] carry-save adder | 4ws, 4wc, the four MG vectors; the four negation carry-ins at the LSB |
| 1 … 5 | `csa52x4`, a [5:2] adder with four lateral carries | g₁…g₅, the four MG vectors, the four lateral carries out of the [6:2] part |
| 0 | XOR slice | parity of g₀, the four MG bits of weight 1 and three lateral carries; the fourth lateral carry becomes c₀ |

The [6:2] adder is built from bit slices. Each slice has two first-level
full adders, (a,b,c) and (d,e,f), then a second-level and a third-level full
adder. A slice passes four lateral carries to the next slice. The third-level
carry of slice i−1 becomes the carry-vector bit of slice i.

The [5:2] adder uses the same slice with a half adder in place of the second
first-level full adder. It needs four lateral carries, not the usual three,
because its carries come from a [6:2] adder.

At position 0 only the sum modulo 2 is kept, so a few XOR gates are enough.

The result differs bit for bit from what a plain [6:2] adder would give.
Its value modulo 2 is the same. The recurrence test checks that value
against an integer model after every step.

## On-the-fly conversion (`ofc`)

Each quotient component is built in two registers:

* Q, the digits so far;
* QM = Q − 1 ulp.

A new digit only appends two bits to one of them, so no carry ever ripples:

    Q  ← (q ≥ 0 ? Q : QM) · 4 + (q mod 4)
    QM ← (q > 0 ? Q : QM) · 4 + ((q − 1) mod 4)

Q starts at 0 and QM starts at −1. After ITERS digits, Q holds the quotient
with 2·ITERS fractional bits.

## Controller (`cdiv_ctrl`)

The controller is a six-state machine: idle, look-up, scale z, scale d,
iterate, done. One counter times each phase. Its outputs are the clock
enables named above. The phase lengths are the parameters `LOOKUP_N` (3),
`SCALE_N` (4) and `ITERS`.

## Departures and open points

* **Sign of K.** The published look-up describes negating one component of K
  depending on whether real and imaginary were swapped. That rule only
  produces 1/d in the first quadrant. This RTL takes the signs directly from
  K = conj(d)/|d|²: K^R follows sign(d^R), and K^I is opposite to sign(d^I).
  The four constants for d = ±1 ± i agree with the published ones.
* **Table contents.** Only the formula and the sizes are given. The exact
  entries here come from rounding to nearest with ties up.
* **Iteration count.** The published results give 16 iterations for the
  36-bit unit. That count is followed (`ITERS = 16`), and it matches the
  published 27-cycle latency. Sixteen radix-4 digits are 32 quotient bits.
  For 36 quotient bits set `ITERS = 18`.
* **Digit table.** Rows for unreachable estimates (|g| ≥ 3.5) are saturated
  to ±3.
* **Not built:**
  * the overlap of the next operation's prescaling with the current
    iterations, which the authors also left out;
  * the unoptimised recurrence, a plain [6:2] adder over all positions;
  * any FPGA-specific mapping (DSP blocks, M4K RAM placement, multi-cycle
    timing constraints).
* **Own choices.** These are this design's own, not taken from the published
  design:
  * the operand format (N-bit ports, N−1 fractional bits);
  * the truncation of x and y;
  * the start/busy/done handshake and back-to-back starts;
  * the reset, which reaches only the controller; datapath registers are
    always loaded before use;
  * the 3-bit two's complement digit code.

## Files

| file | content |
|---|---|
| `rtl/cdiv_pkg.sv` | digit type, widths, cycle counts, full-adder function |
| `rtl/cdiv_top.sv` | the divider |
| `rtl/cdiv_ctrl.sv` | controller |
| `rtl/prescaler.sv` | input/K/product registers and the shared complex multiplier |
| `rtl/prescale_lookup.sv` | rounding, folding, special cases and signs of the look-up |
| `rtl/recip_rom.sv` | ROM (`SPECIAL=0`, 2048×16) and ROM_s (`SPECIAL=1`, 64×16) |
| `rtl/recurrence.sv` | one residual recurrence with its digit selection |
| `rtl/digit_select.sv` | 8-bit CPA and rounding table |
| `rtl/mg.sv` | digit-multiple generator |
| `rtl/csa62.sv`, `rtl/csa52x4.sv` | [6:2] and [5:2]⁴ carry-save adders |
| `rtl/ofc.sv` | on-the-fly converter |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/tb_cdiv_top.sv` | end-to-end test at the default 36-bit size |
| `tb/tb_cdiv_top_p16.sv` | the same test at the 16-bit design point (N = 16, ITERS = 8) |

Every testbench ends by printing `TB_RESULT checks=<n> failures=<m>`.

The end-to-end tests check every operation for three things:

* the latency;
* the prescaling bound ||Kd − 1||∞ < 7/128;
* the residual bound after every iteration, and the quotient against a
  floating-point z/d.

They also count the mechanisms used and fail if one never occurs:

* every look-up path (plain, swapped, ROM_s for either component, both ±1);
* all four sign quadrants;
* every digit value in both recurrences.

Digits ±3 need a large x. They are reached with two directed operands that
have d ≈ 1 and |z| above 57/256.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/cdiv_pkg.sv tb/tb_cdiv_top.sv \
              --top-module tb_cdiv_top -Mdir obj_tb_cdiv_top
    ./obj_tb_cdiv_top/Vtb_cdiv_top

Any other testbench builds the same way; replace the file and top name. The
package must come first on the command line. `-Irtl` lets Verilator find the
other modules by name.

The full-size end-to-end test runs about 410 divisions in well under a
second.

## Changing the design

* **Precision.** `N` sets the operand and residual width. It must be at
  least 10, because the recurrence needs 8 estimate bits plus the ×4 shift.
  `ITERS` sets the number of quotient digits. The controller counter limits
  it to 255.
* **Cycle budget.** `LOOKUP_N` and `SCALE_N` in `cdiv_ctrl` set the cycle
  budget of the multi-cycle paths. `LOOKUP_N` must be at least 2, because the
  ROM read takes one clock.
* **Table precision.** The q = t = 6 sizes are fixed in `cdiv_pkg` and
  `prescale_lookup`. Changing them changes ε_s, which must stay below 7/128.
