# On-line arithmetic SVD array

This design computes the singular value decomposition of an n x n real matrix.
It uses the Brent–Luk–van Loan systolic array, in which n/2 x n/2 processors
each hold a 2x2 block and apply two-sided Jacobi rotations. Every arithmetic
operation is a radix-2 **on-line** unit. Operands travel serially, most
significant digit first, one signed digit per cycle. A unit can start on its
first few input digits, so a chain of operations such as angle computation
followed by rotation overlaps almost completely. The result is a deep pipeline
of small serial units with no parallel multipliers. Its latency is set by the
sum of the units' small on-line delays, not by the sum of their full
computation times.

The default configuration is n = 8 (4 x 4 processors), S = 10 sweeps, and
floating-point operands with an 8-bit exponent and a 56-digit mantissa.

## Number format and operand streams

Every value is one floating-point number with these fields:

- an 8-bit two's-complement exponent `e`;
- a mantissa of M = 56 radix-2 signed digits in {-1, 0, 1}, weighted 1/2, 1/4, ….

Mantissas are *quasi-normalized*, meaning |m| is in [1/4, 1), and the first
digit is never zero. The value zero is represented by exponent -128
(`ZERO_EXP`) with all digits zero. Exponents saturate at ±127.

On a wire an operand is an `ol_t` (package `ol_pkg`): valid, exponent and one
2-bit digit. That is 10 data pins plus a valid bit. One operand occupies M
consecutive *valid* cycles, and the exponent is repeated with every digit.

### Elastic dataflow: no controller

No sequencer exists anywhere in the design. Each unit follows these rules:

- It starts when its first valid input digit arrives.
- It advances one step per valid input digit and stalls on gaps.
- After its M input digits it feeds itself zeros until its M output digits
  have left.
- A new operation may begin on the cycle after the last output digit.

Two-operand units need their inputs in lock-step. Assertions in every unit
check lock-step inputs and no overrun. Skew between operands comes from two
sources: different path delays, and post-normalization shifts that depend on
the data. Two kinds of buffers absorb it:

- **`ol_vdb`, the variable delay buffer.** It has one FIFO per input
  (DEPTH = 128) and a common release. All digits at the same position leave
  together once every input has one. When the inputs are already in phase it
  bypasses the FIFO with no added delay. A buffer sits in front of every
  two-operand join in the design, so any amount of cancellation is tolerated.
  Buffers that feed units also hold back the *first* digit of a new operand
  set until the units behind them are idle (`ready`). Without this, a
  rotation whose elements and angles were all waiting could start while the
  multipliers were still flushing the previous rotation. The full-size run
  hit exactly that case.
- **`ol_fdb`, the fixed delay buffer.** It is a plain shift register. It
  brings a value that is needed much later (|ρ|, τ) close to its partner
  before the join.

Constants (1, and the zero operand) come from `ol_const`. This is a small
counter that emits the constant's digits in the same cycles as the partner
operand's valid signal.

## Arithmetic units

Each unit's digit recurrence works on an exact fixed-point residual, M + a few
fractional bits wide, so no precision is lost inside a unit. A raw result then
passes through `ol_postnorm`, which works as follows:

1. It holds the first raw digit and looks at the next one.
2. The pairs (1,0), (1,1), (-1,0) and (-1,-1) are normalized. The stage then
   releases its digits one cycle behind the core.
3. Any other pair is merged into one digit, z1 ← 2·z1 + z2, and the exponent is
   decremented.
4. The number of merges is bounded per unit. For the adder the limit is M, and
   a result that is still all zeros leaves as the zero operand.

The table gives each unit's on-line delay, from the first input digit to the
first output digit. The measured column lists the values the testbenches
check.

| unit | method | delay here | Table 3 of the source |
|---|---|---|---|
| `ol_add` (also subtract) | exponent compare and alignment through a digit history; residual W = 2(W − z) + p/8, 2 steps look-ahead | 5 + one per normalization shift (up to M under cancellation) | 5 (cancellation excluded) |
| `ol_mul` | W = 2(W − z) + (x·Y + y·X)/16, 3 steps look-ahead; result formed as xy/2 | 5 + up to 3 shifts | 5..7 |
| `ol_div` | divisor sign taken from its first digit; divisor shifted when its 4-digit estimate is < 9/16; 4 steps look-ahead; digit chosen by comparing 2v with the running divisor | 6, +1 if the divisor was shifted, +1 per shift (at most 1) | 6..7 |
| `ol_sqrt` | radicand scaled to x/2 or x/4 by exponent parity, e_s = ⌊e/2⌋ + 1; digit giving the smallest residual | 4 | 4 |

Departures from the source's unit descriptions:

- **Multiplier.** It produces x·y/2, with exponent ex + ey + 1. The plain
  product lets the residual overflow for products near 1. Halving the product
  costs one more possible leading zero, so post-normalization allows 3 merges.
  The worst-case delay is 8 rather than 7.
- **Divider.** Its selection compares against the running divisor instead of
  fixed constants on a short residual estimate. The shift threshold of 9/16
  ensures that a shifted divisor is at least 1/2. A negative divisor is made
  positive, and the quotient digits are negated on the way out.
- **Adder.** It produces (x+y)/2 with exponent max + 1, which bounds its
  residual.

## The angle network (`fhsvd_angle`)

For a diagonal block [a11 a12; a21 a22], the network computes these values for
two half-angles, k = 1 and 2:

    mu1 = a22 - a11, nu1 = a21 + a12        mu2 = a22 + a11, nu2 = a21 - a12
    rho = mu/nu
    tau = sign(rho) / (|rho| + sqrt(1 + rho^2))
    chi = 1/sqrt(1 + tau^2),  sigma = chi*tau
    (chi, sigma) = (1, 0) when |nu| <= 2^-EPS_K |mu|

It then combines them into the left and right rotations:

    cL = chi1 chi2 + sig1 sig2     sL = sig1 chi2 - chi1 sig2
    cR = chi1 chi2 - sig1 sig2     sR = sig1 chi2 + chi1 sig2

Every operator is its own unit, and the units are chained digit-serially.

`ol_sign_abs` derives sign(ρ) and |ρ| from the first digit of ρ, with no
delay.

The epsilon test (`ol_eps_test`) runs on the exponents of μ and ν while ρ is
being computed. It passes when e_ν − e_μ + 2 ≤ −EPS_K or ν is zero, which is a
sufficient condition for |ν| ≤ 2^-EPS_K |μ|. The result is held until χ and σ
appear. When the test passes, χ and σ are replaced by the constants 1 and 0, so
a garbage quotient from ν = 0 never escapes. EPS_K defaults to 50.

Measured delay from the block to the first angle digit is 85 cycles; the
source gives 82. Cancellation in μ or ν adds up to about M more cycles. One
example is a11 = a22, where μ1 = 0 exactly.

## Processors and the rotation

Each rotation level is an `ol_rot2` (o1 = c·p − s·q, o2 = s·p + c·q). It has
four multipliers and one adder/subtractor pair, behind a 4-input variable
delay buffer. A two-sided rotation is two levels:

    u1 = cL a11 - sL a21   u2 = cL a12 - sL a22
    u3 = sL a11 + cL a21   u4 = sL a12 + cL a22
    b11 = cR u1 - sR u2    b12 = sR u1 + cR u2
    b21 = cR u3 - sR u4    b22 = sR u3 + cR u4

The two processor types differ in how they use this rotation:

- **`diag_proc`** (main diagonal) contains the angle network and a
  `diag_rot`. The `diag_rot` computes only b11 and b22. b12 and b21 leave as the
  zero operand, because the rotation diagonalizes the block by construction.
- **`offdiag_proc`** contains an `offdiag_rot` (full rotation). It passes the
  left angle along its processor row and the right angle along its processor
  column through one register stage.

Elements reach an off-diagonal processor long before its angles do. They wait
in the rotation's input buffer. When cancellation delays one diagonal
processor's angles, a neighbour that got its angles earlier can already send
the next iteration's elements while the old operand is still waiting. The
buffer must therefore hold up to two operands, so DEPTH defaults to
128 (≥ 2M). With DEPTH = 64 the full-size simulation overflowed.

## The array (`svd_array`)

Processor (p, q) holds rows 2p, 2p+1 and columns 2q, 2q+1.

- Angles flow outward from the diagonal. A processor takes its left angle from
  the row neighbour nearer the diagonal, and its right angle from the column
  neighbour nearer the diagonal.
- After each rotation, elements move to their neighbours by the parallel
  ordering. With K = n/2 and slots L (first) and R (second) of processor k:

      L0 stays, R0 -> L1, Lk -> Lk+1 (1 <= k <= K-2), L(K-1) -> R(K-1), Rk -> Rk-1

  The rule is applied independently to the row slot and the column slot of
  every element.
- Every element output counts its own operands. After S·(n−1) iterations the
  last rotated block leaves on `res` instead of being passed on.
- The iteration rate is set entirely by data arrival. A diagonal processor
  starts its next angle computation as soon as its four new elements are in.

The interface has two sides:

- **Load.** Drive `ld[p][q][r][c]`, element (2p+r, 2q+c), with all 64 operands
  starting in the same cycle.
- **Result.** Read `res` with the same indexing. The diagonal holds the signed
  singular values, and the off-diagonal elements are 0. The load and result
  ports stand in for the host interface, which the source does not define.

Measured at n = 8, S = 10 on a random matrix:

- The iteration period ranges from 116 to 444 cycles; the source estimates
  107.
- The whole decomposition took 15,104 cycles; the source formula gives 7,547.

Once the matrix is nearly diagonal, sums such as mu = a22 - a11 and adds of
zero elements cancel, and cancellation delays the adders behind them. That
is why late iterations are the slowest. The difference comes from the measured unit delays, the buffered joins,
and cancellation, which the source leaves out of its timing analysis. With
cancellation the delay can grow by up to M cycles per affected adder.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. The testbenches fall into three groups:

- **Arithmetic units.** Each unit gets hundreds of random operations with
  random redundant recodings of the inputs and random gaps. Results are
  compared with real arithmetic within 2^-(M−3) relative. Every operation's
  on-line delay is checked, and the testbench fails if the minimum-delay and
  shifted cases never occurred.
- **Networks and processors.** These are compared with a real-valued model of
  the formulas above. The testbenches include the cases ν = 0 (epsilon test
  passes) and μ = 0 (total cancellation) and check the on-line delays.
- **`tb_svd_array`.** This runs the whole array at its defaults (n = 8,
  S = 10, M = 56) on a random matrix. It compares each of the 64 results with a
  real-valued model of the same algorithm and ordering. It also checks:
  - the Frobenius norm is preserved;
  - the off-diagonal part has vanished;
  - the iteration count and period are as expected;
  - these mechanisms each occurred: epsilon-test pass and miss, adder
    normalization shifts, divisor shifts, buffer waits and exchanges.

  Verilator needs about 5 minutes to compile it; the run takes under a
  minute. The largest element error against the model was 8e-15, and the
  off-diagonal part was exactly 0.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/ol_pkg.sv tb/ol_tb_pkg.sv \
        tb/tb_ol_div.sv --top-module tb_ol_div
    ./obj_dir/Vtb_ol_div

## Limits and open points

- **Size.** Only the n = 8 array (and a 4 x 4 reduction) was simulated. Larger n is a parameter change,
  but the array grows as (n/2)^2 processors of about 40 units each. Synthesis of
  the full array is slow.
- **Unit counts.** A diagonal processor has 20 adders, 22 multipliers, 6
  dividers and 4 square-root units. An off-diagonal processor has 8 adders and
  16 multipliers. Both match the source's unit counts.
- **Buffer placement.** Buffers are placed at every join instead of only where
  the source's figure shows them. This costs area but makes correctness
  independent of cancellation.
- **Scope.** Significance monitoring, a host interface and a blocking
  alternative to buffering are not implemented.
