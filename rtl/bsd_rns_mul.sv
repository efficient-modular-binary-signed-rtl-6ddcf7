// bsd_rns_mul: residue number system multiplier for the moduli set {2^N-1, 2^N, 2^N+1} with
// every residue in Pos-Neg binary signed-digit form.
//
// An integer is carried as three residues, one per modulus; multiplying two integers means
// multiplying the matching residues, each in its own channel, with no signal between channels.
// The three channels are posneg_rns_mul instances that differ only in how they fold what
// overflows position N-1 back into position 0 (unchanged, dropped, negated). Conversion into and
// out of the residue system lies outside this block. N = 8 is the default, the size of the
// published multiplier; N = 16 is the other size it is evaluated at.
//
// Interface: x_*, y_* are the N-digit residues of the two operands modulo 2^N-1 (_m1), 2^N (_m)
// and 2^N+1 (_p1); p_* are the residues of the product, each congruent to x_* * y_* modulo its
// modulus and in redundant BSD form.
// Timing: purely combinational; the three channels work in parallel.
module bsd_rns_mul
  import posneg_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  pn_digit_t [N-1:0] x_m1,
  input  pn_digit_t [N-1:0] y_m1,
  input  pn_digit_t [N-1:0] x_m,
  input  pn_digit_t [N-1:0] y_m,
  input  pn_digit_t [N-1:0] x_p1,
  input  pn_digit_t [N-1:0] y_p1,
  output pn_digit_t [N-1:0] p_m1,
  output pn_digit_t [N-1:0] p_m,
  output pn_digit_t [N-1:0] p_p1
);
  posneg_rns_mul #(.N(N), .MODULUS(MOD_2N_M1)) u_mul_m1 (.x(x_m1), .y(y_m1), .p(p_m1));
  posneg_rns_mul #(.N(N), .MODULUS(MOD_2N))    u_mul_m  (.x(x_m),  .y(y_m),  .p(p_m));
  posneg_rns_mul #(.N(N), .MODULUS(MOD_2N_P1)) u_mul_p1 (.x(x_p1), .y(y_p1), .p(p_p1));
endmodule
