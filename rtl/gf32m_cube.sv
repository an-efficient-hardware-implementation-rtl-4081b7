// gf32m_cube: GF(3^2m) cubing, combinational.
//
// For a0 + a1*s with s^2 = -1: (a0 + a1*s)^3 = a0^3 + a1^3 * s^3 = a0^3 - a1^3 * s.
// Two gf3m_cube circuits do the work; the negation of the s part is a swap of the two
// bits of every digit, so no logic is added beyond the two cubers.
// Timing: combinational.
module gf32m_cube
  import gf3_pkg::*;
#(
  parameter int unsigned M  = M_DEFAULT,
  parameter int unsigned T  = T_DEFAULT,
  parameter gf3_t        PT = PT_DEFAULT,
  parameter gf3_t        P0 = P0_DEFAULT
) (
  input  logic [1:0][M-1:0][1:0] a,
  output logic [1:0][M-1:0][1:0] c
);

  logic [M-1:0][1:0] cube1;

  gf3m_cube #(.M(M), .T(T), .PT(PT), .P0(P0)) u_cube0 (.a(a[0]), .c(c[0]));
  gf3m_cube #(.M(M), .T(T), .PT(PT), .P0(P0)) u_cube1 (.a(a[1]), .c(cube1));

  always_comb begin
    for (int i = 0; i < M; i++) c[1][i] = gf3_neg(cube1[i]);
  end

endmodule
