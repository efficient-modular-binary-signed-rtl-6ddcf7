// posneg_rns_mul: Pos-Neg BSD-RNS multiplier for one modulus, 2^N-1, 2^N or 2^N+1.
//
// p is congruent to x * y modulo the modulus. The product is formed in two steps, as in the
// published multiplier: the partial product generator (posneg_ppg) makes N rows, each a digit
// product of X with one digit of Y, already rotated into N digit positions by the modular rule;
// the reduction tree (posneg_reduction_tree) then adds the N rows with log2(N) levels of
// carry-free Pos-Neg BSD-RNS adders. Nothing in the path propagates a carry along the word, so
// the delay grows with log2(N), not with N.
//
// Interface: x, y, p are N-digit Pos-Neg BSD residues, digit 0 least significant. The result is
// a redundant residue: its value lies in [-(2^N-1), 2^N-1] and is congruent to x*y, not reduced
// to one canonical form.
// Timing: purely combinational, one digit product plus 2*ceil(log2(N)) full-adder delays.
module posneg_rns_mul
  import posneg_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter modulus_e    MODULUS = MOD_2N_M1
) (
  input  pn_digit_t [N-1:0] x,
  input  pn_digit_t [N-1:0] y,
  output pn_digit_t [N-1:0] p
);
  pn_digit_t [N-1:0][N-1:0] pp;

  posneg_ppg #(.N(N), .MODULUS(MODULUS)) u_ppg (.x(x), .y(y), .pp(pp));

  posneg_reduction_tree #(.N(N), .ROWS(N), .MODULUS(MODULUS)) u_tree (.rows(pp), .sum(p));
endmodule
