// tate_accel: Tate pairing accelerator for supersingular curves over GF(3^m)
// (modified Duursma-Lee algorithm, curve y^2 = x^3 - x + 1), top level.
//
// Given P = (xp, yp) and R = (xr, yr) with coordinates in GF(3^M) it computes the loop
// value t in GF(3^6M) of the modified Duursma-Lee algorithm (the pairing before the final
// exponentiation, which is not part of this unit):
//   alpha = xp, beta = yp, x = xr^3, y = yr^3, d = M mod 3, t = 1
//   repeat M times:
//     alpha = alpha^9, beta = beta^9, mu = alpha + x + d
//     gamma = -mu^2 - (beta*y) s - mu r - r^2
//     t = t^3 * gamma, y = -y, d = d - 1
// GF(3^6M) elements are indexed [power of r][s part][digit], r^3 = r + 1, s^2 = -1.
//
// Datapath: two GF(3^m) cubers (alpha and beta, reused for xr^3 and yr^3 during
// initialisation), two GF(3^m) adders for mu, two serial GF(3^m) multipliers for mu^2 and
// beta*y, one GF(3^6m) cuber and one GF(3^6m) Karatsuba multiplier built from 18 serial
// GF(3^m) multipliers. Cubing and addition are single-cycle combinational blocks, so only
// the two multiplication steps take more than one cycle. tate_ctrl sequences the steps.
//
// Interface and timing: pulse start for one cycle in idle or done. xp, yp, xr and yr are
// read during the first four cycles after start (alpha, beta, x, y in that order) and must
// be stable then. The result t_out is valid while done is high; done rises
// 4 + M*(2M + 4) cycles after the first initialisation cycle (19210 for M = 97) and stays
// high, with t_out unchanged, until the next start. busy is high while a pairing runs.
// The cycle schedule, the unit count and the single-cycle cubing and addition follow the
// published design; the port list, the start/busy/done handshake, the register reset and
// the choice of the b = +1 curve are this implementation's own.
module tate_accel
  import gf3_pkg::*;
  import tate_pkg::*;
#(
  parameter int unsigned M  = M_DEFAULT,
  parameter int unsigned T  = T_DEFAULT,
  parameter gf3_t        PT = PT_DEFAULT,
  parameter gf3_t        P0 = P0_DEFAULT
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [M-1:0][1:0]           xp,
  input  logic [M-1:0][1:0]           yp,
  input  logic [M-1:0][1:0]           xr,
  input  logic [M-1:0][1:0]           yr,
  output logic                        busy,
  output logic                        done,
  output logic [2:0][1:0][M-1:0][1:0] t_out
);

  typedef logic [M-1:0][1:0]           fm_t;
  typedef logic [2:0][1:0][M-1:0][1:0] f6_t;

  localparam gf3_t D_INIT = (M % 3 == 1) ? GF3_ONE : (M % 3 == 2) ? GF3_TWO : GF3_ZERO;

  ctrl_t  ctrl;
  state_e state;

  fm_t  alpha_q, beta_q, x_q, y_q, mu_q;
  gf3_t d_q;
  f6_t  t_q;

  fm_t  cube_a_in, cube_a_out, cube_b_in, cube_b_out;
  fm_t  ax_sum, d_vec, mu_nxt, mu_sq, beta_y;
  f6_t  gamma, cube6_in, cube6_out, prod6;
  logic g_busy, g_done, g_busy2, g_done2, t6_busy, t6_done;

  tate_ctrl #(.M(M)) u_ctrl (
    .clk, .rst_n, .start, .ctrl, .state, .busy, .done);

  // GF(3^m) cubers: alpha/beta in the loop, xr/yr during initialisation
  assign cube_a_in = ctrl.ld_x ? xr : alpha_q;
  assign cube_b_in = ctrl.ld_y ? yr : beta_q;
  gf3m_cube #(.M(M), .T(T), .PT(PT), .P0(P0)) u_cube_a (.a(cube_a_in), .c(cube_a_out));
  gf3m_cube #(.M(M), .T(T), .PT(PT), .P0(P0)) u_cube_b (.a(cube_b_in), .c(cube_b_out));

  // mu = alpha + x + d
  always_comb begin
    d_vec    = '0;
    d_vec[0] = d_q;
  end
  gf3m_add #(.M(M)) u_add_ax (.a(alpha_q), .b(x_q),   .c(ax_sum));
  gf3m_add #(.M(M)) u_add_d  (.a(ax_sum),  .b(d_vec), .c(mu_nxt));

  // gamma products: mu^2 and beta*y
  gf3m_mul_lse #(.M(M), .T(T), .PT(PT), .P0(P0)) u_mul_mu (
    .clk, .rst_n, .start(ctrl.gamma_start), .a(mu_q), .b(mu_q), .c(mu_sq),
    .busy(g_busy), .done(g_done));
  gf3m_mul_lse #(.M(M), .T(T), .PT(PT), .P0(P0)) u_mul_by (
    .clk, .rst_n, .start(ctrl.gamma_start), .a(beta_q), .b(y_q), .c(beta_y),
    .busy(g_busy2), .done(g_done2));

  // gamma = -mu^2 - (beta*y) s - mu r - r^2: only negations, i.e. wiring
  always_comb begin
    gamma = '0;
    for (int i = 0; i < M; i++) begin
      gamma[0][0][i] = gf3_neg(mu_sq[i]);
      gamma[0][1][i] = gf3_neg(beta_y[i]);
      gamma[1][0][i] = gf3_neg(mu_q[i]);
    end
    gamma[2][0][0] = gf3_neg(GF3_ONE);
  end

  // t^3: t register in the first iteration, the last product afterwards
  assign cube6_in = ctrl.t_from_prod ? prod6 : t_q;
  gf36m_cube #(.M(M), .T(T), .PT(PT), .P0(P0)) u_cube6 (.a(cube6_in), .c(cube6_out));

  // t * gamma
  gf36m_mul #(.M(M), .T(T), .PT(PT), .P0(P0)) u_mul6 (
    .clk, .rst_n, .start(ctrl.tmul_start), .a(t_q), .b(gamma), .c(prod6),
    .busy(t6_busy), .done(t6_done));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alpha_q <= '0;
      beta_q  <= '0;
      x_q     <= '0;
      y_q     <= '0;
      mu_q    <= '0;
      d_q     <= GF3_ZERO;
      t_q     <= '0;
    end else begin
      if (ctrl.ld_alpha) begin
        alpha_q       <= xp;
        d_q           <= D_INIT;
        t_q           <= '0;
        t_q[0][0][0]  <= GF3_ONE;
      end
      if (ctrl.ld_beta)    beta_q  <= yp;
      if (ctrl.ld_x)       x_q     <= cube_a_out;
      if (ctrl.ld_y)       y_q     <= cube_b_out;
      if (ctrl.cube_ab) begin
        alpha_q <= cube_a_out;
        beta_q  <= cube_b_out;
      end
      if (ctrl.ld_mu)      mu_q    <= mu_nxt;
      if (ctrl.t_cube)     t_q     <= cube6_out;
      if (ctrl.tmul_start) begin
        for (int i = 0; i < M; i++) y_q[i] <= gf3_neg(y_q[i]);
        d_q <= gf3_add(d_q, GF3_TWO);
      end
    end
  end

  assign t_out = prod6;

  // the fixed-length steps of the controller end exactly when the products are ready
  a_gamma_ready : assert property (@(posedge clk) disable iff (!rst_n)
                                   (state == S_TCUBE) |-> (g_done && g_done2))
    else $error("tate_accel: gamma products not ready at t cubing");
  a_t_ready : assert property (@(posedge clk) disable iff (!rst_n)
                               (state != S_TMUL && $past(state) == S_TMUL) |-> t6_done)
    else $error("tate_accel: GF(3^6m) product not ready at end of step");
  a_units_idle : assert property (@(posedge clk) disable iff (!rst_n)
                                  (g_busy == g_busy2) && ((state != S_TCUBE) || !t6_busy))
    else $error("tate_accel: multipliers busy when they should be idle");

endmodule
