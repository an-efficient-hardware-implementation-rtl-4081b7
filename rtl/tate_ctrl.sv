// tate_ctrl: control unit of the Tate pairing accelerator.
//
// A state machine that issues the steps of the modified Duursma-Lee algorithm with the
// cycle budget of the design: four one-cycle initialisation steps, then M loop
// iterations of
//   cube alpha,beta (1) | cube alpha,beta (1) | mu (1) | gamma products (M) |
//   cube t (1) | multiply t by gamma (M)
// i.e. 4 + M*(2M + 4) cycles, 19210 for M = 97. The multi-cycle steps are timed by a
// cycle counter rather than by the multipliers' done signals, since their latency is
// exactly M; the top checks with an assertion that the two agree.
//
// Interface: start (one cycle, accepted in S_IDLE or S_DONE) begins a pairing; busy is
// high from the first initialisation cycle to the last loop cycle; done is high in
// S_DONE, the cycle after the last loop cycle, and stays high until the next start.
// ctrl carries one-cycle strobes for the datapath; state is exported for observation.
module tate_ctrl
  import tate_pkg::*;
#(
  parameter int unsigned M = gf3_pkg::M_DEFAULT
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output ctrl_t  ctrl,
  output state_e state,
  output logic   busy,
  output logic   done
);

  localparam int unsigned CW = $clog2(M + 1);

  state_e        state_q, state_d;
  logic [CW-1:0] cyc_q, iter_q;
  logic          last_cyc, last_iter;

  assign last_cyc  = (cyc_q == CW'(M - 1));
  assign last_iter = (iter_q == CW'(M - 1));

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE, S_DONE: if (start) state_d = S_INIT_A;
      S_INIT_A:       state_d = S_INIT_B;
      S_INIT_B:       state_d = S_INIT_X;
      S_INIT_X:       state_d = S_INIT_Y;
      S_INIT_Y:       state_d = S_CUBE1;
      S_CUBE1:        state_d = S_CUBE2;
      S_CUBE2:        state_d = S_MU;
      S_MU:           state_d = S_GAMMA;
      S_GAMMA:        if (last_cyc) state_d = S_TCUBE;
      S_TCUBE:        state_d = S_TMUL;
      S_TMUL:         if (last_cyc) state_d = last_iter ? S_DONE : S_CUBE1;
      default:        state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cyc_q   <= '0;
      iter_q  <= '0;
    end else begin
      state_q <= state_d;
      // cycle counter inside the M-cycle steps
      if ((state_q == S_GAMMA || state_q == S_TMUL) && !last_cyc) cyc_q <= cyc_q + 1'b1;
      else                                                        cyc_q <= '0;
      // loop counter
      if (state_q == S_INIT_A)                 iter_q <= '0;
      else if (state_q == S_TMUL && last_cyc)  iter_q <= iter_q + 1'b1;
    end
  end

  always_comb begin
    ctrl             = '0;
    ctrl.ld_alpha    = (state_q == S_INIT_A);
    ctrl.ld_beta     = (state_q == S_INIT_B);
    ctrl.ld_x        = (state_q == S_INIT_X);
    ctrl.ld_y        = (state_q == S_INIT_Y);
    ctrl.cube_ab     = (state_q == S_CUBE1) || (state_q == S_CUBE2);
    ctrl.ld_mu       = (state_q == S_MU);
    ctrl.gamma_start = (state_q == S_GAMMA) && (cyc_q == '0);
    ctrl.t_cube      = (state_q == S_TCUBE);
    ctrl.t_from_prod = (state_q == S_TCUBE) && (iter_q != '0);
    ctrl.tmul_start  = (state_q == S_TMUL) && (cyc_q == '0);
  end

  assign state = state_q;
  assign busy  = (state_q != S_IDLE) && (state_q != S_DONE);
  assign done  = (state_q == S_DONE);

endmodule
