// posneg_cell: digit position i of the Pos-Neg BSD adder, a 4:2 compressor of two full adders.
//
// FA1 adds the three equal-weight bits x_i^+, x_i^- and y_i^+ into an intermediate sum u_i and a
// carry d_i^+ of double weight, which goes to position i+1. FA2 adds y_i^-, the carry d_{i-1}^+
// arriving from position i-1 and u_i; its sum is the posibit s_i^+ of the result digit i and its
// carry is the negabit s_{i+1}^- of result digit i+1. Because the carry into FA2 comes from FA1
// of the neighbour, never from FA2, no carry travels more than one position: the delay of an
// n-digit addition is two full adders whatever n is. This arrangement follows the published
// Pos-Neg adder exactly.
//
// Interface: x, y digits of position i; d_in = d_{i-1}^+ from the position below (or the
// modulus feedback at position 0); d_out = d_i^+; s_pos = s_i^+; s_neg_up = s_{i+1}^-.
// Purely combinational.
module posneg_cell
  import posneg_pkg::*;
(
  input  pn_digit_t x,
  input  pn_digit_t y,
  input  logic      d_in,
  output logic      d_out,
  output logic      s_pos,
  output logic      s_neg_up
);
  logic u;

  full_adder fa1 (.a(x.pos), .b(x.neg), .c(y.pos), .sum(u),     .carry(d_out));
  full_adder fa2 (.a(y.neg), .b(d_in),  .c(u),     .sum(s_pos), .carry(s_neg_up));
endmodule
