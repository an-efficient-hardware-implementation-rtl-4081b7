// gf3_pkg: shared types, constants and digit-level arithmetic for characteristic-three fields.
//
// A GF(3) digit is held in two bits {H,L} with 0 = 2'b00, 1 = 2'b01 and 2 = 2'b10; the
// pattern 2'b11 is never produced. With this encoding negation (equal to multiplication
// by 2) is a swap of the two bits, which costs only wiring. Digit addition uses the
// OR/XOR expression for this encoding:
//   t   = (aL | bH) ^ (aH | bL)
//   cH  = (aL | bL) ^ t
//   cL  = (aH | bH) ^ t
// A GF(3^m) element is a packed array of m digits, digit i being the coefficient of x^i.
// The default field is GF(3^97) with p(x) = x^97 + x^16 + 2; the package carries that
// polynomial as M/T/PT/P0 (x^M + PT*x^T + P0), which every arithmetic module takes as
// parameters.
package gf3_pkg;

  typedef logic [1:0] gf3_t;

  localparam gf3_t GF3_ZERO = 2'b00;
  localparam gf3_t GF3_ONE  = 2'b01;
  localparam gf3_t GF3_TWO  = 2'b10;

  // Reduction trinomial x^M + PT*x^T + P0 of the base field.
  localparam int unsigned M_DEFAULT  = 97;
  localparam int unsigned T_DEFAULT  = 16;
  localparam gf3_t        PT_DEFAULT = GF3_ONE;
  localparam gf3_t        P0_DEFAULT = GF3_TWO;

  // Digit sum in the {H,L} encoding.
  function automatic gf3_t gf3_add(gf3_t a, gf3_t b);
    logic t;
    t = (a[0] | b[1]) ^ (a[1] | b[0]);
    return {(a[0] | b[0]) ^ t, (a[1] | b[1]) ^ t};
  endfunction

  // Negation: swap H and L.
  function automatic gf3_t gf3_neg(gf3_t a);
    return {a[0], a[1]};
  endfunction

  // Product of a digit with a digit k: 0, the digit itself, or its negation.
  function automatic gf3_t gf3_scale(gf3_t a, gf3_t k);
    return (k == GF3_ONE) ? a : (k == GF3_TWO) ? gf3_neg(a) : GF3_ZERO;
  endfunction

endpackage
