// gf32m_addsub: GF(3^2m) adder or subtractor.
//
// GF(3^2m) is built over GF(3^m) as c0 + c1*s with s^2 = -1, so an element is a pair of
// GF(3^m) elements ([0] the constant part, [1] the s part). Addition and subtraction act
// on the two parts independently, so this block is two gf3m_add instances side by side.
// SUB = 1 gives a - b, the negation of b being done by wiring inside gf3m_add.
// Timing: combinational.
module gf32m_addsub
  import gf3_pkg::*;
#(
  parameter int unsigned M   = M_DEFAULT,
  parameter bit          SUB = 1'b0
) (
  input  logic [1:0][M-1:0][1:0] a,
  input  logic [1:0][M-1:0][1:0] b,
  output logic [1:0][M-1:0][1:0] c
);

  for (genvar k = 0; k < 2; k++) begin : g_part
    gf3m_add #(.M(M), .SUB(SUB)) u_add (.a(a[k]), .b(b[k]), .c(c[k]));
  end

endmodule
