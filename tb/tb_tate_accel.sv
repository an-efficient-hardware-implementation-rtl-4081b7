// tb_tate_accel: end-to-end test of the Tate pairing accelerator at its default size,
// GF(3^97), with no parameter overrides.
//
// Three pairings with random coordinates are computed and compared with a step-by-step
// software model of the modified Duursma-Lee loop. For each run the testbench checks the
// cycle count from the first initialisation cycle to done (19210), that the result holds
// while done is high, and that the inputs are only needed in the four initialisation
// cycles (they are scrambled afterwards). It also counts how often each mechanism of the
// loop happened: the four initialisation loads (with the cubers switched to xr and yr),
// the alpha/beta cubings, the mu update, the gamma products, the t cubing both from the
// t register (first iteration) and from the last product, the GF(3^6m) multiplication,
// the negation of y and the wrap of d from 0 to 2. A mechanism that never happened
// counts as a failure.
module tb_tate_accel;
  import gf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fm_t  xp, yp, xr, yr;
  f6_t  t_out;
  logic busy, done;
  int   checks = 0, failures = 0;

  int n_init_in = 0, n_cube_ab = 0, n_mu = 0, n_gamma = 0, n_tcube_reg = 0;
  int n_tcube_prod = 0, n_tmul = 0, n_neg_y = 0, n_d_wrap = 0;

  tate_accel dut (.clk, .rst_n, .start, .xp, .yp, .xr, .yr, .busy, .done, .t_out);

  always #5 clk = ~clk;

  // mechanism counters, sampled on the clock edge that performs each step
  always @(posedge clk) if (rst_n) begin
    if (dut.ctrl.ld_x || dut.ctrl.ld_y) n_init_in++;
    if (dut.ctrl.cube_ab)               n_cube_ab++;
    if (dut.ctrl.ld_mu)                 n_mu++;
    if (dut.ctrl.gamma_start)           n_gamma++;
    if (dut.ctrl.t_cube && !dut.ctrl.t_from_prod) n_tcube_reg++;
    if (dut.ctrl.t_cube &&  dut.ctrl.t_from_prod) n_tcube_prod++;
    if (dut.ctrl.tmul_start) begin
      n_tmul++;
      n_neg_y++;
      if (dut.d_q == 2'b00) n_d_wrap++;
    end
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(fm_t a, fm_t b, fm_t c, fm_t d);
    f6_t exp_t;
    int  cycles = 0;
    exp_t = r_pairing(a, b, c, d);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    xp = a; yp = b; xr = c; yr = d;
    while (!done && cycles < 30000) begin
      cycles++;
      if (cycles == 5) begin
        xp = rnd_fm(); yp = rnd_fm(); xr = rnd_fm(); yr = rnd_fm();
      end
      @(negedge clk);
    end
    expect_eq("cycles to done", cycles, 4 + M * (2 * M + 4));
    checks++;
    if (t_out !== exp_t) begin
      failures++;
      $display("FAIL pairing result\n got %h\n exp %h", t_out, exp_t);
    end
    repeat (7) @(negedge clk);
    checks++;
    if (t_out !== exp_t || !done) begin
      failures++;
      $display("FAIL result not held");
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fm_t one;
    xp = '0; yp = '0; xr = '0; yr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    one = '0; one[0] = 2'b01;
    run(one, rnd_fm(), rnd_fm(), one);
    run(rnd_fm(), rnd_fm(), rnd_fm(), rnd_fm());
    run(rnd_fm(), rnd_fm(), rnd_fm(), rnd_fm());
    $display("mechanisms: init_in=%0d cube_ab=%0d mu=%0d gamma=%0d tcube_reg=%0d tcube_prod=%0d tmul=%0d neg_y=%0d d_wrap=%0d",
             n_init_in, n_cube_ab, n_mu, n_gamma, n_tcube_reg, n_tcube_prod, n_tmul, n_neg_y, n_d_wrap);
    expect_eq("init loads through cubers", n_init_in, 3 * 2);
    expect_eq("alpha/beta cubings", n_cube_ab, 3 * 2 * M);
    expect_eq("mu updates", n_mu, 3 * M);
    expect_eq("gamma products", n_gamma, 3 * M);
    expect_eq("t cubing from register", n_tcube_reg, 3);
    expect_eq("t cubing from product", n_tcube_prod, 3 * (M - 1));
    expect_eq("t multiplications", n_tmul, 3 * M);
    expect_eq("y negations", n_neg_y, 3 * M);
    checks++;
    if (n_d_wrap == 0) begin
      failures++;
      $display("FAIL d never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
