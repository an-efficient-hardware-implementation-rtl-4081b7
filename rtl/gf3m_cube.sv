// gf3m_cube: GF(3^m) cubing (Frobenius map), single-cycle combinational circuit.
//
// In characteristic three (sum a_i x^i)^3 = sum a_i x^(3i), so cubing needs no
// multiplication: digit i of the input moves to position 3i of a polynomial of degree
// up to 3(M-1). The part of degree M and above is then folded back with the reduction
// trinomial x^M = -PT*x^T - P0, working from the highest degree down so that terms
// which land above M-1 again are folded in turn. With the default x^97 + x^16 + 2 and
// T < M/3 this is exactly the T + U + V split: U (degrees M..2M-1) is folded once and V
// (degrees 2M and up) twice, leaving a network of GF(3) digit adders only, with no
// registers. Because the polynomial is a fixed parameter, every addition is hard-wired
// and synthesis keeps only the adders that are really needed. Reducing for the fixed
// polynomial in the same cycle follows the architecture; describing the adder network by
// a folding loop instead of a hand-written list of adders is this implementation's own
// choice, and the depth of the chain that results is left to synthesis.
//
// Ports: a = input element, c = a^3 mod p(x). Timing: combinational.
module gf3m_cube
  import gf3_pkg::*;
#(
  parameter int unsigned M  = M_DEFAULT,
  parameter int unsigned T  = T_DEFAULT,
  parameter gf3_t        PT = PT_DEFAULT,
  parameter gf3_t        P0 = P0_DEFAULT
) (
  input  logic [M-1:0][1:0] a,
  output logic [M-1:0][1:0] c
);

  localparam int unsigned W = 3 * M - 2;  // digits of the unreduced cube

  gf3_t s [W];

  always_comb begin
    for (int k = 0; k < W; k++) s[k] = GF3_ZERO;
    for (int i = 0; i < M; i++) s[3*i] = a[i];
    // x^k = x^(k-M) * (-PT*x^T - P0) for every k >= M, highest first
    for (int k = W - 1; k >= M; k--) begin
      s[k-M+T] = gf3_add(s[k-M+T], gf3_scale(s[k], gf3_neg(PT)));
      s[k-M]   = gf3_add(s[k-M],   gf3_scale(s[k], gf3_neg(P0)));
    end
    for (int i = 0; i < M; i++) c[i] = s[i];
  end

endmodule
