// gf32m_mul: GF(3^2m) multiplier built from three serial GF(3^m) multipliers.
//
// GF(3^2m) = GF(3^m)[s]/(s^2 + 1), elements a0 + a1*s. The product uses the
// three-multiplication (Karatsuba) form
//   c0 = a0*b0 - a1*b1
//   c1 = (a0 + a1)*(b0 + b1) - a0*b0 - a1*b1
// Two GF(3^m) adders form the operand sums in front of the multipliers, and three
// GF(3^m) subtractors combine the products behind them. Both adder stages are
// combinational, so the block takes the same M clocks as one gf3m_mul_lse: start in
// cycle 0, done and a valid c in cycle M. a and b are sampled only in the start cycle;
// c is held until the next start.
module gf32m_mul
  import gf3_pkg::*;
#(
  parameter int unsigned M  = M_DEFAULT,
  parameter int unsigned T  = T_DEFAULT,
  parameter gf3_t        PT = PT_DEFAULT,
  parameter gf3_t        P0 = P0_DEFAULT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [1:0][M-1:0][1:0]  a,
  input  logic [1:0][M-1:0][1:0]  b,
  output logic [1:0][M-1:0][1:0]  c,
  output logic                    busy,
  output logic                    done
);

  logic [M-1:0][1:0] a_sum, b_sum;
  logic [M-1:0][1:0] p00, p11, pss, pss_m00;
  logic [2:0]        busy_v, done_v;

  gf3m_add #(.M(M)) u_asum (.a(a[0]), .b(a[1]), .c(a_sum));
  gf3m_add #(.M(M)) u_bsum (.a(b[0]), .b(b[1]), .c(b_sum));

  gf3m_mul_lse #(.M(M), .T(T), .PT(PT), .P0(P0)) u_m00 (
    .clk, .rst_n, .start, .a(a[0]), .b(b[0]), .c(p00), .busy(busy_v[0]), .done(done_v[0]));
  gf3m_mul_lse #(.M(M), .T(T), .PT(PT), .P0(P0)) u_m11 (
    .clk, .rst_n, .start, .a(a[1]), .b(b[1]), .c(p11), .busy(busy_v[1]), .done(done_v[1]));
  gf3m_mul_lse #(.M(M), .T(T), .PT(PT), .P0(P0)) u_mss (
    .clk, .rst_n, .start, .a(a_sum), .b(b_sum), .c(pss), .busy(busy_v[2]), .done(done_v[2]));

  gf3m_add #(.M(M), .SUB(1'b1)) u_sub0 (.a(pss),     .b(p00), .c(pss_m00));
  gf3m_add #(.M(M), .SUB(1'b1)) u_sub1 (.a(pss_m00), .b(p11), .c(c[1]));
  gf3m_add #(.M(M), .SUB(1'b1)) u_sub2 (.a(p00),     .b(p11), .c(c[0]));

  // the three multipliers run in lock step
  assign busy = busy_v[0];
  assign done = done_v[0];

  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
                                (&busy_v || ~|busy_v) && (&done_v || ~|done_v))
    else $error("gf32m_mul: sub-multipliers out of step");

endmodule
