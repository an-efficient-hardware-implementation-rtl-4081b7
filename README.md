# Tate pairing accelerator over GF(3^97)

This RTL computes the Tate pairing on the supersingular curve y² = x³ − x + 1 over
GF(3^97), using the modified Duursma–Lee algorithm. The inputs are two points
P = (xp, yp) and R = (xr, yr) with GF(3^97) coordinates. The output is an element t of
the degree-6 extension GF(3^(6·97)): the pairing before its final exponentiation. A
pairing takes exactly **19210 clock cycles**.

The design comes from two ideas:

* **Cubing and addition cost one cycle each.** In characteristic three, cubing is linear,
  so it needs only digit adders: no multiplier and no register. Every cubing and addition
  in the loop is therefore a single combinational pass.
* **All multiplications are bit-serial.** Each GF(3^97) multiplication uses one serial
  multiplier that takes one digit per clock. A GF(3^6m) product uses 18 of these
  multipliers side by side. It finishes in the same 97 cycles as a single base-field
  product, because the adders before and after the multipliers are combinational.

The architecture follows the accelerator described in *"An Efficient Hardware
Implementation of the Tate Pairing in Characteristic Three"* (Kömürçü and Savaş). The
figures, equations and cycle counts quoted below are reproduced by this RTL. Where the RTL
had to choose something the description leaves open, the choice is listed under
"Departures and own choices".

## Digits: two bits, negation for free

A GF(3) digit is held in two bits {H, L}: 0 = `00`, 1 = `01`, 2 = `10`. The pattern
`11` never occurs. Because 2 ≡ −1, negating a digit means swapping H and L, which costs
only wiring. Subtraction is therefore an adder whose second operand has its bits swapped
(`gf3m_add` with `SUB = 1`). Multiplying a digit by 2 is likewise just a swap. The digit
adder is the two-level OR/XOR network

    t  = (aL | bH) ^ (aH | bL)
    cH = (aL | bL) ^ t
    cL = (aH | bH) ^ t

which is `gf3_pkg::gf3_add`.

## The field tower and how elements are laid out

| field | construction | SystemVerilog type | index meaning |
|---|---|---|---|
| GF(3^m) | GF(3)[x] / (x^97 + x^16 + 2) | `logic [M-1:0][1:0]` | `[i]` = coefficient of x^i |
| GF(3^2m) | GF(3^m)[s] / (s² + 1) | `logic [1:0][M-1:0][1:0]` | `[0]` constant, `[1]` s part |
| GF(3^6m) | GF(3^2m)[r] / (r³ − r − 1) | `logic [2:0][1:0][M-1:0][1:0]` | `[k][j]` = coefficient of r^k·s^j |

The base field is set by the parameters `M`, `T`, `PT` and `P0`, which describe the
trinomial x^M + PT·x^T + P0. Their defaults give x^97 + x^16 + 2, and every arithmetic
module takes them.

## GF(3^m) units

**`gf3m_cube`: cubing in one combinational pass.** Digit i of the input moves to
position 3i. Every term of degree k ≥ M is then folded back using
x^M = −PT·x^T − P0, starting from the highest degree, so that terms landing above M−1
again are folded in turn. For the default trinomial (T < M/3), the middle third of the
spread polynomial folds once and the top third twice. What remains is a fixed network of
digit adders with no registers, which synthesis prunes to what the polynomial needs.
Written as one sum per output digit, no digit of x^97 + x^16 + 2 needs more than four
terms: 106 adders, three in series. The RTL describes the fold as a loop and leaves the
final shape of the network to synthesis.

**`gf3m_mul_lse`: serial least-significant-digit-first multiplier.** Each clock it does:

    C <- C + b_i · A
    A <- A · x mod p(x)    (digit shifted out of A[96] is added at x^16 and x^0)

B is a shift register, so b_i is always its digit 0. Scaling A by b_i is a select: zero,
A, or A with its bits swapped. With the fixed trinomial, the interleaved reduction is just
two digit additions.

Timing: the first iteration runs in the cycle in which `start` is sampled, directly on
the `a` and `b` inputs. A product therefore takes exactly M clocks. With `start` in
cycle 0, `c` holds A·B from cycle M on, `done` pulses in cycle M, and `c` stays put until
the next start.

## GF(3^2m) and GF(3^6m) units

**`gf32m_mul`** uses three serial multipliers in Karatsuba form:

    c0 = a0·b0 − a1·b1
    c1 = (a0 + a1)(b0 + b1) − a0·b0 − a1·b1

**`gf36m_mul`** applies three-term Karatsuba over GF(3^2m), using six `gf32m_mul`
(18 serial multipliers):

    m22 = a2b2   m11 = a1b1   m00 = a0b0
    m21 = (a2+a1)(b2+b1)   m20 = (a2+a0)(b2+b0)   m10 = (a1+a0)(b1+b0)
    d4 = m22                 d3 = m21 − m22 − m11
    d2 = m20 − m22 − m00 + m11
    d1 = m10 − m00 − m11     d0 = m00

It then reduces with r³ = r + 1 and r⁴ = r² + r:

    c2 = d2 + d4    c1 = d1 + d3 + d4    c0 = d0 + d3

All the sums sit in front of or behind the multipliers' registers and are
combinational. The whole GF(3^6m) product therefore has the same M-cycle start/done
timing as `gf3m_mul_lse`. The 18 sub-multipliers run in lock step, which an assertion
checks.

**`gf32m_cube`** computes (a0 + a1·s)³ = a0³ − a1³·s. It uses two `gf3m_cube`, and the
negation is wiring.

**`gf36m_cube`** uses three `gf32m_cube` and three GF(3^2m) adders. With r³ = r + 1 and
r⁶ = r² − r + 1:

    n2 = a2³    n1 = a1³ − a2³    n0 = a0³ + a1³ + a2³

## The pairing loop and its 19210-cycle schedule

`tate_accel` runs this loop:

    alpha = xp, beta = yp, x = xr³, y = yr³, d = M mod 3 (= 1), t = 1
    repeat M times:
        alpha = alpha⁹, beta = beta⁹
        mu    = alpha + x + d
        gamma = −mu² − (beta·y)·s − mu·r − r²
        t     = t³ · gamma
        y     = −y,  d = d − 1 (mod 3)

`tate_ctrl` gives each step one state:

| state | work | cycles | for M = 97 |
|---|---|---|---|
| `S_INIT_A..S_INIT_Y` | alpha ← xp, beta ← yp, x ← xr³, y ← yr³ (one per cycle) | 4 | 4 |
| `S_CUBE1` | alpha ← alpha³, beta ← beta³ | 1 per iteration | 97 |
| `S_CUBE2` | alpha ← alpha³, beta ← beta³ | 1 per iteration | 97 |
| `S_MU` | mu ← alpha + x + d | 1 per iteration | 97 |
| `S_GAMMA` | mu² and beta·y on two serial multipliers | M per iteration | 9409 |
| `S_TCUBE` | t ← t³ | 1 per iteration | 97 |
| `S_TMUL` | t·gamma on the GF(3^6m) multiplier; y ← −y, d ← d − 1 | M per iteration | 9409 |
| | total: 4 + M·(2M + 4) | | **19210** |

Two details keep the count at exactly 19210:

* **No separate write-back of the product.** gamma is never stored. It is pure wiring
  (negations and constants) from the `mu` register and the two multipliers' output
  registers, which hold their results until their next start. The product t·gamma also
  stays in the GF(3^6m) multiplier's output registers. The next iteration's `S_TCUBE`
  cubes it straight from there into `t`: in the first iteration from the `t` register,
  which holds 1, and afterwards from the product. No cycle is spent copying the product
  back.
* **Fixed step lengths.** `tate_ctrl` times the M-cycle steps with its own counter, not
  by waiting for `done`. Assertions in `tate_accel` check that the multipliers finish
  exactly at the step boundary.

The two GF(3^m) cubers serve alpha and beta in the loop. During initialisation, an
input mux switches them to xr and yr.

## Interface of `tate_accel`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse, accepted when idle or done |
| `xp`, `yp`, `xr`, `yr` | in | M×2 | coordinates of P and R |
| `busy` | out | 1 | pairing in progress |
| `done` | out | 1 | result valid; held until the next `start` |
| `t_out` | out | 3×2×M×2 | result t, indexed `[r power][s part][digit]` |

Timing after a `start` pulse in cycle 0:

* `xp` must be stable in cycle 1 (the first initialisation cycle).
* `yp` must be stable in cycle 2.
* `xr` must be stable in cycle 3.
* `yr` must be stable in cycle 4.

The inputs may change after that. `done` rises in cycle 19211, i.e. 19210 cycles after
the first initialisation cycle.

## Departures and own choices

* **Curve.** Only E⁺: y² = x³ − x + 1, with r³ = r + 1 and d counting down. The E⁻ curve
  would need r³ = r − 1 and d counting up, and is not selectable.
* **Final exponentiation.** The final exponentiation is not part of the unit. `t_out` is
  the raw loop value, to be exponentiated elsewhere.
* **Reduction of the Karatsuba result.** Reducing with r³ = r + 1 puts d3 into the
  constant coefficient: c0 = d0 + d3. Likewise r⁶ = r² − r + 1, which is what the cubing
  network uses. Both are checked against a schoolbook model.
* **Sign of the s term in gamma.** The s term of gamma is −beta·y, as in the form of the
  algorithm this design follows.
* **Fixed polynomial.** The multiplier has its polynomial fixed at elaboration. A variant
  that accepts the polynomial at run time is not provided.
* **Adders.** All adders are parallel. There is no shared-adder scheduling.
* **Cubing network.** `gf3m_cube` describes the reduction as a folding loop rather
  than a hand-written list of adders. The depth of the resulting network is up to the
  synthesis tool.
* **Handshake, reset and input capture.** The start/busy/done handshake, the reset
  values, and the one-coordinate-per-cycle input capture are choices of this RTL.

## Files

| file | contents |
|---|---|
| `rtl/gf3_pkg.sv` | digit type, field defaults, digit add/negate/scale functions |
| `rtl/tate_pkg.sv` | controller state enum and control-word struct |
| `rtl/gf3m_add.sv`, `rtl/gf32m_addsub.sv` | GF(3^m) and GF(3^2m) adder/subtractor |
| `rtl/gf3m_cube.sv`, `rtl/gf32m_cube.sv`, `rtl/gf36m_cube.sv` | cubing at the three levels |
| `rtl/gf3m_mul_lse.sv`, `rtl/gf32m_mul.sv`, `rtl/gf36m_mul.sv` | multipliers at the three levels |
| `rtl/tate_ctrl.sv` | control unit |
| `rtl/tate_accel.sv` | top level: datapath registers, units, controller |
| `tb/gf_ref_pkg.sv` | independent integer-arithmetic reference (schoolbook products, a·a·a cubes, the loop) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every module has a self-checking testbench. Each compares the module against
`gf_ref_pkg`, which works on integers mod 3 and shares no code with the RTL. Each
testbench ends by printing `TB_RESULT checks=N failures=F`.

* The arithmetic testbenches use random operands plus corner cases: single monomials
  for cubing, x^96·x^96 for the multiplier's reduction, and r² for the GF(3^6m)
  reduction.
* The multiplier testbenches also check the M-cycle latency.
* `tb_tate_ctrl` checks the 19210-cycle total and the number of cycles spent in every
  state.
* `tb_tate_accel` runs three complete GF(3^97) pairings at the default parameters and
  compares `t_out` with the software loop. It also checks the cycle count, and that the
  inputs are needed only during initialisation. It counts every loop mechanism (the
  initial loads through the cubers, the alpha/beta cubings, mu, gamma, t cubing from the
  register and from the product, the GF(3^6m) multiplication, the negation of y and the
  wrap of d) and fails if any of them never happened.

The random coordinates are not points on the curve. The datapath computes the same
function either way, but bilinearity of the result is not tested. That would also need
the final exponentiation.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/gf3_pkg.sv rtl/tate_pkg.sv tb/gf_ref_pkg.sv tb/tb_tate_accel.sv \
        --top-module tb_tate_accel
    ./obj_dir/Vtb_tate_accel

Substitute any other `tb/tb_*.sv` and its module name. The full-size end-to-end test
takes a few minutes to compile, because of the 18 parallel 97-digit multipliers, and
seconds to run.

## Size

Coarse synthesis of `tate_accel` with Yosys, before technology mapping, gives about
80k word-level cells and 13.9k flip-flops. Most of the flip-flops are the 18 × 3 × 194
bits of the GF(3^6m) multiplier's A, B and C registers.

## Changing the design

* **Another field.** Override `M`, `T`, `PT` and `P0` on `tate_accel` for another
  trinomial. The testbench reference package is fixed to GF(3^97) and must be changed to
  match. `d` starts at M mod 3, computed automatically.
* **Another multiplier.** The serial multiplier can be swapped for a digit-serial one,
  processing w digits per clock in ⌈M/w⌉ clocks. Then change the step length in
  `tate_ctrl` (`last_cyc`) to match. The assertions in `tate_accel` catch a mismatch.
