// posneg_digit_mul: product z = x * y of two Pos-Neg binary signed digits.
//
// The product of two digits in {-1, 0, 1} is again a digit, so no carry arises. The rule is the
// digit-production table of the design:
//   - x is zero (01 or 10): z takes the encoding of x,
//   - otherwise y is zero: z takes the encoding of y,
//   - otherwise both are +1 or -1: z = 11 (+1) when their signs agree, 00 (-1) when they differ.
// When both digits are zero the table allows either zero encoding; x is given priority here,
// which is this design's choice. A nonzero digit has equal posibit and negabit, so the sign test
// compares the two posibits only.
//
// Interface: x, y in; z out. Purely combinational, a few gates deep.
module posneg_digit_mul
  import posneg_pkg::*;
(
  input  pn_digit_t x,
  input  pn_digit_t y,
  output pn_digit_t z
);
  logic x_zero, y_zero, same_sign;

  assign x_zero    = x.pos ^ x.neg;
  assign y_zero    = y.pos ^ y.neg;
  assign same_sign = ~(x.pos ^ y.pos);

  always_comb begin
    if (x_zero)      z = x;
    else if (y_zero) z = y;
    else             z = '{pos: same_sign, neg: same_sign};
  end
endmodule
