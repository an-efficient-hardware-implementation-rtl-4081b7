// gf3m_mul_lse: bit-serial GF(3^m) multiplier, least significant element first.
//
// One digit of the multiplier B is consumed per clock, starting with b_0:
//   C <- b_i * A + C        (partial product, M digit scalings and M digit adders)
//   A <- A * x mod p(x)     (shift by one digit with interleaved reduction)
// The reduction uses x^M = -PT*x^T - P0: the digit shifted out of the top of A is
// scaled and added at positions 0 and T, so with the fixed polynomial x^97 + x^16 + 2
// only two digit additions are needed per step. The structure is: A register with its
// reduction feedback, B input register (shifted right one digit per clock so that b_i is
// always in digit 0), the A*b_i digit scaler, the adder and the output register C.
//
// The first iteration is performed in the cycle that start is sampled, directly from the
// a/b inputs, so a product takes exactly M clocks: with start high in cycle 0, the
// iterations happen at the ends of cycles 0..M-1 and c holds A*B from cycle M on, where
// done pulses for one cycle. c then stays unchanged until the next start. a and b are
// only sampled in the start cycle. busy is high in cycles 1..M-1. A start while busy
// restarts the product; the control units in this design never do that, and an assertion
// flags it.
module gf3m_mul_lse
  import gf3_pkg::*;
#(
  parameter int unsigned M  = M_DEFAULT,
  parameter int unsigned T  = T_DEFAULT,
  parameter gf3_t        PT = PT_DEFAULT,
  parameter gf3_t        P0 = P0_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [M-1:0][1:0] a,
  input  logic [M-1:0][1:0] b,
  output logic [M-1:0][1:0] c,
  output logic             busy,
  output logic             done
);

  localparam int unsigned CW = $clog2(M + 1);

  logic [M-1:0][1:0] a_q, b_q, c_q;
  logic [M-1:0][1:0] a_cur, b_cur, c_cur;
  logic [M-1:0][1:0] a_nxt, b_nxt, c_nxt;
  logic [CW-1:0]     cnt_q;

  // operands of the current iteration: inputs in the start cycle, registers afterwards
  assign a_cur = start ? a : a_q;
  assign b_cur = start ? b : b_q;
  assign c_cur = start ? '0 : c_q;

  always_comb begin
    // C <- b_i * A + C
    for (int j = 0; j < M; j++) begin
      c_nxt[j] = gf3_add(c_cur[j], gf3_scale(a_cur[j], b_cur[0]));
    end
    // A <- A * x mod p(x)
    a_nxt    = {a_cur[M-2:0], GF3_ZERO};
    a_nxt[0] = gf3_scale(a_cur[M-1], gf3_neg(P0));
    a_nxt[T] = gf3_add(a_nxt[T], gf3_scale(a_cur[M-1], gf3_neg(PT)));
    // next multiplier digit into position 0
    b_nxt = {GF3_ZERO, b_cur[M-1:1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      c_q   <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start || busy) begin
        a_q <= a_nxt;
        b_q <= b_nxt;
        c_q <= c_nxt;
      end
      if (start) begin
        cnt_q <= CW'(1);
        busy  <= (M > 1);
        done  <= (M == 1);
      end else if (busy) begin
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == CW'(M - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign c = c_q;

  // the controllers wait for a product to finish before starting the next one
  a_no_restart : assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("gf3m_mul_lse: start while a product is in progress");

endmodule
