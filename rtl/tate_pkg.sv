// tate_pkg: states and control word of the Tate pairing accelerator.
//
// The controller walks through the steps of the modified Duursma-Lee loop one state per
// step. The four initialisation states load one register each; the loop states follow
// the loop body: two alpha/beta cubings, the mu update, the two GF(3^m) products that
// build gamma, the cubing of t and the multiplication of t by gamma. The control word is
// a set of one-cycle strobes decoded from the state, consumed by the datapath in
// tate_accel.
package tate_pkg;

  typedef enum logic [3:0] {
    S_IDLE,
    S_INIT_A,   // alpha <- xp, t <- 1, d <- (M mod 3)
    S_INIT_B,   // beta  <- yp
    S_INIT_X,   // x     <- xr^3
    S_INIT_Y,   // y     <- yr^3
    S_CUBE1,    // alpha <- alpha^3, beta <- beta^3
    S_CUBE2,    // alpha <- alpha^3, beta <- beta^3
    S_MU,       // mu    <- alpha + x + d
    S_GAMMA,    // mu^2 and beta*y on two GF(3^m) multipliers, M cycles
    S_TCUBE,    // t     <- t^3
    S_TMUL,     // t * gamma on the GF(3^6m) multiplier, M cycles; y <- -y, d <- d - 1
    S_DONE
  } state_e;

  typedef struct packed {
    logic ld_alpha;     // also resets t to 1 and d to M mod 3
    logic ld_beta;
    logic ld_x;
    logic ld_y;
    logic cube_ab;
    logic ld_mu;
    logic gamma_start;
    logic t_cube;
    logic t_from_prod;  // with t_cube: cube the last product instead of the t register
    logic tmul_start;   // also y <- -y, d <- d - 1
  } ctrl_t;

endpackage
