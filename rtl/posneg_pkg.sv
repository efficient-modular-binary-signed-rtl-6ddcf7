// posneg_pkg: types and constants shared by the Pos-Neg BSD-RNS arithmetic blocks.
//
// A binary signed digit (BSD) d in {-1, 0, 1} is held as two bits of equal weight: a posibit
// p in {0, 1} and a negabit whose stored bit q stands for q - 1 in {-1, 0}. The digit value is
// therefore p + q - 1:  {p,q} = 00 -> -1, 01 or 10 -> 0, 11 -> +1. Swapping p and q never changes
// the value, and inverting both bits negates the digit. An n-digit residue is a packed array of
// such digits, index 0 the least significant, digit i weighing 2^i.
//
// modulus_e picks which modulus of the set {2^n-1, 2^n, 2^n+1} a block works in; it decides what
// is fed back from the most significant position into the least significant one.
// PN_ZERO (posibit 0, negabit 1) is the zero digit this design uses where a digit is forced to
// zero; the choice between the two zero encodings is this design's own.
package posneg_pkg;

  typedef enum logic [1:0] {
    MOD_2N_M1 = 2'd0,  // modulus 2^n - 1: digits and carries wrap around unchanged
    MOD_2N    = 2'd1,  // modulus 2^n: what leaves the top is dropped
    MOD_2N_P1 = 2'd2   // modulus 2^n + 1: what leaves the top re-enters negated
  } modulus_e;

  typedef struct packed {
    logic pos;  // posibit, weight +1 when set
    logic neg;  // negabit, stands for -1 when clear and 0 when set
  } pn_digit_t;

  localparam pn_digit_t PN_ZERO = '{pos: 1'b0, neg: 1'b1};

  // Negation of a digit: invert both bits (-1 <-> +1, 01 <-> 10).
  function automatic pn_digit_t pn_negate(input pn_digit_t d);
    return '{pos: ~d.pos, neg: ~d.neg};
  endfunction

endpackage
