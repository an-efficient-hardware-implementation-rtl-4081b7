// gf3m_add: GF(3^m) adder or subtractor, purely combinational.
//
// Each of the M digits is added independently with the two-bit OR/XOR expression of
// gf3_pkg::gf3_add, so the block has no carries and a delay of one digit adder. With
// SUB = 1 the block computes a - b: the H and L bits of every digit of b are swapped on
// the way in, which negates b without any logic. The same block therefore serves as
// adder and as subtractor throughout the accelerator, as the design intends.
//
// Ports: a, b are M-digit operands (digit i = coefficient of x^i), c = a + b or a - b.
// Timing: combinational, no clock.
module gf3m_add
  import gf3_pkg::*;
#(
  parameter int unsigned M   = M_DEFAULT,
  parameter bit          SUB = 1'b0
) (
  input  logic [M-1:0][1:0] a,
  input  logic [M-1:0][1:0] b,
  output logic [M-1:0][1:0] c
);

  always_comb begin
    for (int i = 0; i < M; i++) begin
      c[i] = gf3_add(a[i], SUB ? gf3_neg(b[i]) : b[i]);
    end
  end

endmodule
