// posneg_ppg: modular partial product generator of the Pos-Neg BSD-RNS multiplier.
//
// Row i (0 <= i < N) is pp(i) = |y_i * X * 2^i| modulo the chosen modulus, written as N
// Pos-Neg digits. Each digit is a single digit product (posneg_digit_mul). Shifting X left by i
// pushes its top i digits x_{N-i} .. x_{N-1} above position N-1; they are brought back into the
// bottom i positions of the row by the modular rotation rule:
//   MOD_2N_M1  rotated in unchanged, because 2^N = 1 (a cyclic rotation of X),
//   MOD_2N     replaced by zero digits, because 2^N = 0,
//   MOD_2N_P1  rotated in with their sign inverted, because 2^N = -1.
// So digit k of row i is y_i * x_{k-i} for k >= i, and (+, 0 or -) y_i * x_{N-i+k} for k < i.
// The rotation is only wiring: one level of digit products is all the logic. This follows the
// published generator; the zero digit used for modulus 2^N is this design's choice (PN_ZERO).
//
// Interface: x, y are N-digit residues; pp[i][k] is digit k of row i.
// Timing: purely combinational.
module posneg_ppg
  import posneg_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter modulus_e    MODULUS = MOD_2N_M1
) (
  input  pn_digit_t [N-1:0]        x,
  input  pn_digit_t [N-1:0]        y,
  output pn_digit_t [N-1:0][N-1:0] pp
);
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar k = 0; k < N; k++) begin : g_dig
      pn_digit_t z;
      if (k >= i) begin : g_plain
        posneg_digit_mul u_mul (.x(x[k-i]), .y(y[i]), .z(z));
        assign pp[i][k] = z;
      end else if (MODULUS == MOD_2N) begin : g_zero
        assign z        = PN_ZERO;
        assign pp[i][k] = z;
      end else begin : g_wrap
        posneg_digit_mul u_mul (.x(x[N-i+k]), .y(y[i]), .z(z));
        if (MODULUS == MOD_2N_P1) begin : g_neg
          assign pp[i][k] = pn_negate(z);
        end else begin : g_same
          assign pp[i][k] = z;
        end
      end
    end
  end
endmodule
