// tb_tate_ctrl: self-checking test of the accelerator's control unit (M = 97).
// It runs two complete pairings and checks, against counts worked out from the loop
// schedule, the total cycle count from the first initialisation cycle to done
// (4 + M*(2M + 4) = 19210), the number of cycles spent in each state, the number of
// strobes issued, that t_from_prod is low only in the first iteration, and that busy and
// done behave as documented. A start pulse during a run is shown to be ignored.
module tb_tate_ctrl;
  import tate_pkg::*;

  localparam int M = 97;

  logic   clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  ctrl_t  ctrl;
  state_e state;
  logic   busy, done;
  int     checks = 0, failures = 0;

  tate_ctrl #(.M(M)) dut (.clk, .rst_n, .start, .ctrl, .state, .busy, .done);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_pairing(bit poke_start);
    int cycles = 0, n_busy = 0;
    int n_init = 0, n_cube = 0, n_mu = 0, n_gamma = 0, n_tcube = 0, n_tmul = 0;
    int s_alpha = 0, s_beta = 0, s_x = 0, s_y = 0, s_cube = 0, s_mu = 0;
    int s_g = 0, s_tc = 0, s_prod = 0, s_tm = 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && cycles < 30000) begin
      cycles++;
      if (busy) n_busy++;
      if (poke_start && cycles == 500) start = 1'b1;
      if (poke_start && cycles == 501) start = 1'b0;
      case (state)
        S_INIT_A, S_INIT_B, S_INIT_X, S_INIT_Y: n_init++;
        S_CUBE1, S_CUBE2: n_cube++;
        S_MU:    n_mu++;
        S_GAMMA: n_gamma++;
        S_TCUBE: n_tcube++;
        S_TMUL:  n_tmul++;
        default: ;
      endcase
      s_alpha += ctrl.ld_alpha;
      s_beta  += ctrl.ld_beta;
      s_x     += ctrl.ld_x;
      s_y     += ctrl.ld_y;
      s_cube  += ctrl.cube_ab;
      s_mu    += ctrl.ld_mu;
      s_g     += ctrl.gamma_start;
      s_tc    += ctrl.t_cube;
      s_prod  += ctrl.t_from_prod;
      s_tm    += ctrl.tmul_start;
      if (ctrl.t_cube && s_tc == 1 && ctrl.t_from_prod) begin
        failures++;
        $display("FAIL first t cubing takes the product");
      end
      @(negedge clk);
    end
    expect_eq("total cycles", cycles, 4 + M * (2 * M + 4));
    expect_eq("busy cycles", n_busy, 4 + M * (2 * M + 4));
    expect_eq("init cycles", n_init, 4);
    expect_eq("alpha/beta cubing cycles", n_cube, 2 * M);
    expect_eq("mu cycles", n_mu, M);
    expect_eq("gamma cycles", n_gamma, M * M);
    expect_eq("t cubing cycles", n_tcube, M);
    expect_eq("t multiply cycles", n_tmul, M * M);
    expect_eq("ld_alpha", s_alpha, 1);
    expect_eq("ld_beta", s_beta, 1);
    expect_eq("ld_x", s_x, 1);
    expect_eq("ld_y", s_y, 1);
    expect_eq("cube_ab", s_cube, 2 * M);
    expect_eq("ld_mu", s_mu, M);
    expect_eq("gamma_start", s_g, M);
    expect_eq("t_cube", s_tc, M);
    expect_eq("t_from_prod", s_prod, M - 1);
    expect_eq("tmul_start", s_tm, M);
    // done stays high while idle
    repeat (5) @(negedge clk);
    expect_eq("done held", int'(done), 1);
    expect_eq("busy low in done", int'(busy), 0);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_eq("idle after reset", int'(state == S_IDLE), 1);
    expect_eq("not done after reset", int'(done), 0);
    run_pairing(1'b0);
    run_pairing(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
