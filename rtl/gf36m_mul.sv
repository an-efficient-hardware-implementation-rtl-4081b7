// gf36m_mul: GF(3^6m) multiplier, Karatsuba over GF(3^2m) followed by reduction.
//
// Operands are a2 r^2 + a1 r + a0 with GF(3^2m) coefficients. Six GF(3^2m) products are
// formed in parallel (18 serial GF(3^m) multipliers in all):
//   m22 = a2*b2, m11 = a1*b1, m00 = a0*b0,
//   m21 = (a2+a1)(b2+b1), m20 = (a2+a0)(b2+b0), m10 = (a1+a0)(b1+b0)
// and combined into the degree-4 product
//   d4 = m22, d3 = m21 - m22 - m11, d2 = m20 - m22 - m00 + m11,
//   d1 = m10 - m00 - m11, d0 = m00.
// Reduction by r^3 = r + 1 (so r^4 = r^2 + r) gives
//   c2 = d2 + d4,  c1 = d1 + d3 + d4,  c0 = d0 + d3.
// The operand adders and all adders behind the multipliers are combinational, so the
// whole product takes M clocks like a single GF(3^m) multiplication: start in cycle 0,
// done and a valid c in cycle M. a and b are sampled only in the start cycle; c holds
// until the next start. Ports are indexed [power of r][s part][digit].
module gf36m_mul
  import gf3_pkg::*;
#(
  parameter int unsigned M  = M_DEFAULT,
  parameter int unsigned T  = T_DEFAULT,
  parameter gf3_t        PT = PT_DEFAULT,
  parameter gf3_t        P0 = P0_DEFAULT
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [2:0][1:0][M-1:0][1:0] a,
  input  logic [2:0][1:0][M-1:0][1:0] b,
  output logic [2:0][1:0][M-1:0][1:0] c,
  output logic                       busy,
  output logic                       done
);

  typedef logic [1:0][M-1:0][1:0] f2_t;

  // operand sums, Karatsuba pairs (2,1), (2,0), (1,0)
  f2_t a21, b21, a20, b20, a10, b10;
  // the six partial products
  f2_t m22, m11, m00, m21, m20, m10;
  // combination and reduction
  f2_t t3, t2a, t2b, t1, d4, d3, d2, d1, d0, r1;
  logic [5:0] busy_v, done_v;

  gf32m_addsub #(.M(M)) u_a21 (.a(a[2]), .b(a[1]), .c(a21));
  gf32m_addsub #(.M(M)) u_b21 (.a(b[2]), .b(b[1]), .c(b21));
  gf32m_addsub #(.M(M)) u_a20 (.a(a[2]), .b(a[0]), .c(a20));
  gf32m_addsub #(.M(M)) u_b20 (.a(b[2]), .b(b[0]), .c(b20));
  gf32m_addsub #(.M(M)) u_a10 (.a(a[1]), .b(a[0]), .c(a10));
  gf32m_addsub #(.M(M)) u_b10 (.a(b[1]), .b(b[0]), .c(b10));

  gf32m_mul #(.M(M), .T(T), .PT(PT), .P0(P0)) u_m22 (
    .clk, .rst_n, .start, .a(a[2]), .b(b[2]), .c(m22), .busy(busy_v[0]), .done(done_v[0]));
  gf32m_mul #(.M(M), .T(T), .PT(PT), .P0(P0)) u_m11 (
    .clk, .rst_n, .start, .a(a[1]), .b(b[1]), .c(m11), .busy(busy_v[1]), .done(done_v[1]));
  gf32m_mul #(.M(M), .T(T), .PT(PT), .P0(P0)) u_m00 (
    .clk, .rst_n, .start, .a(a[0]), .b(b[0]), .c(m00), .busy(busy_v[2]), .done(done_v[2]));
  gf32m_mul #(.M(M), .T(T), .PT(PT), .P0(P0)) u_m21 (
    .clk, .rst_n, .start, .a(a21),  .b(b21),  .c(m21), .busy(busy_v[3]), .done(done_v[3]));
  gf32m_mul #(.M(M), .T(T), .PT(PT), .P0(P0)) u_m20 (
    .clk, .rst_n, .start, .a(a20),  .b(b20),  .c(m20), .busy(busy_v[4]), .done(done_v[4]));
  gf32m_mul #(.M(M), .T(T), .PT(PT), .P0(P0)) u_m10 (
    .clk, .rst_n, .start, .a(a10),  .b(b10),  .c(m10), .busy(busy_v[5]), .done(done_v[5]));

  // Karatsuba recombination
  assign d4 = m22;
  assign d0 = m00;
  gf32m_addsub #(.M(M), .SUB(1'b1)) u_s3a (.a(m21), .b(m22), .c(t3));
  gf32m_addsub #(.M(M), .SUB(1'b1)) u_s3b (.a(t3),  .b(m11), .c(d3));
  gf32m_addsub #(.M(M), .SUB(1'b1)) u_s2a (.a(m20), .b(m22), .c(t2a));
  gf32m_addsub #(.M(M))             u_a2b (.a(t2a), .b(m11), .c(t2b));
  gf32m_addsub #(.M(M), .SUB(1'b1)) u_s2c (.a(t2b), .b(m00), .c(d2));
  gf32m_addsub #(.M(M), .SUB(1'b1)) u_s1a (.a(m10), .b(m00), .c(t1));
  gf32m_addsub #(.M(M), .SUB(1'b1)) u_s1b (.a(t1),  .b(m11), .c(d1));

  // reduction modulo r^3 - r - 1
  gf32m_addsub #(.M(M)) u_r2  (.a(d2), .b(d4), .c(c[2]));
  gf32m_addsub #(.M(M)) u_r1a (.a(d1), .b(d3), .c(r1));
  gf32m_addsub #(.M(M)) u_r1b (.a(r1), .b(d4), .c(c[1]));
  gf32m_addsub #(.M(M)) u_r0  (.a(d0), .b(d3), .c(c[0]));

  assign busy = busy_v[0];
  assign done = done_v[0];

  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
                                (&busy_v || ~|busy_v) && (&done_v || ~|done_v))
    else $error("gf36m_mul: sub-multipliers out of step");

endmodule
