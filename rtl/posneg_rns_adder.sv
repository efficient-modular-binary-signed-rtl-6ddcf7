// posneg_rns_adder: carry-free addition of two N-digit Pos-Neg BSD residues modulo 2^N-1, 2^N or
// 2^N+1.
//
// N posneg_cell instances sit side by side. Cell i passes its FA1 carry d_i^+ to cell i+1 and
// its FA2 carry to result digit i+1 as the negabit s_{i+1}^-. The two signals that leave the
// most significant cell, d_{N-1}^+ and s_N^-, come back into position 0 as d_{-1}^+ and s_0^-
// according to MODULUS:
//   MOD_2N_M1  unchanged (2^N = 1 modulo 2^N-1),
//   MOD_2N     dropped: d_{-1}^+ = 0 and s_0^- = 1, both of zero value,
//   MOD_2N_P1  inverted (2^N = -1 modulo 2^N+1; the inversion adds the correcting constant).
// The result s is congruent to x + y modulo the chosen modulus; like any BSD residue it is not
// reduced to a unique form. The feedback rules and the cell are those of the published Pos-Neg
// adder; the parameter names are this design's own.
//
// Interface: x, y, s are packed arrays of N digits, digit 0 least significant.
// Timing: purely combinational, two full-adder delays from any input to any output.
module posneg_rns_adder
  import posneg_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter modulus_e    MODULUS = MOD_2N_M1
) (
  input  pn_digit_t [N-1:0] x,
  input  pn_digit_t [N-1:0] y,
  output pn_digit_t [N-1:0] s
);
  logic [N-1:0] d;       // d[i] = d_i^+, the FA1 carry out of position i
  logic [N-1:0] neg_up;  // neg_up[i] = s_{i+1}^-, the FA2 carry out of position i
  logic         d_wrap;  // d_{-1}^+ into position 0
  logic         neg_wrap;  // s_0^-, negabit of result digit 0

  always_comb begin
    unique case (MODULUS)
      MOD_2N_M1: begin d_wrap = d[N-1];  neg_wrap = neg_up[N-1];  end
      MOD_2N:    begin d_wrap = 1'b0;    neg_wrap = 1'b1;         end
      default:   begin d_wrap = ~d[N-1]; neg_wrap = ~neg_up[N-1]; end
    endcase
  end

  for (genvar i = 0; i < N; i++) begin : g_pos
    logic d_in;
    if (i == 0) begin : g_lsp
      assign d_in     = d_wrap;
      assign s[i].neg = neg_wrap;
    end else begin : g_mid
      assign d_in     = d[i-1];
      assign s[i].neg = neg_up[i-1];
    end
    posneg_cell u_cell (
      .x       (x[i]),
      .y       (y[i]),
      .d_in    (d_in),
      .d_out   (d[i]),
      .s_pos   (s[i].pos),
      .s_neg_up(neg_up[i])
    );
  end
endmodule
