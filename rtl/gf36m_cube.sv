// gf36m_cube: GF(3^6m) cubing in one clock-free pass.
//
// GF(3^6m) = GF(3^2m)[r]/(r^3 - r - 1), elements a2*r^2 + a1*r + a0 with GF(3^2m)
// coefficients. Since cubing is linear in characteristic three,
//   (a2 r^2 + a1 r + a0)^3 = a2^3 r^6 + a1^3 r^3 + a0^3
// and with r^3 = r + 1, r^6 = r^2 - r + 1 the result is
//   n2 = a2^3,  n1 = a1^3 - a2^3,  n0 = (a1^3 + a0^3) + a2^3.
// The unit is three gf32m_cube blocks and three GF(3^2m) adder/subtractors.
// Ports: a, c indexed [power of r][s part][digit]. Timing: combinational.
module gf36m_cube
  import gf3_pkg::*;
#(
  parameter int unsigned M  = M_DEFAULT,
  parameter int unsigned T  = T_DEFAULT,
  parameter gf3_t        PT = PT_DEFAULT,
  parameter gf3_t        P0 = P0_DEFAULT
) (
  input  logic [2:0][1:0][M-1:0][1:0] a,
  output logic [2:0][1:0][M-1:0][1:0] c
);

  logic [2:0][1:0][M-1:0][1:0] cb;
  logic [1:0][M-1:0][1:0]      s10;

  for (genvar k = 0; k < 3; k++) begin : g_cube
    gf32m_cube #(.M(M), .T(T), .PT(PT), .P0(P0)) u_cube (.a(a[k]), .c(cb[k]));
  end

  assign c[2] = cb[2];
  gf32m_addsub #(.M(M), .SUB(1'b1)) u_n1  (.a(cb[1]), .b(cb[2]), .c(c[1]));
  gf32m_addsub #(.M(M))             u_s10 (.a(cb[1]), .b(cb[0]), .c(s10));
  gf32m_addsub #(.M(M))             u_n0  (.a(s10),   .b(cb[2]), .c(c[0]));

endmodule
