// posneg_reduction_tree: adds ROWS Pos-Neg BSD residues of N digits with a binary tree of
// Pos-Neg BSD-RNS adders.
//
// Level 0 holds the input rows. Level l+1 pairs the rows of level l, (0,1), (2,3), ..., and adds
// each pair in one posneg_rns_adder, halving the row count; after ceil(log2(ROWS)) levels one
// row, the sum, remains. With ROWS = N = 8 this is three levels of 4, 2 and 1 adders. The pairing
// follows the published tree. The tree is drawn for a power-of-two row count; for any other
// count a row left without a partner passes to the next level unchanged, which is this design's
// own extension. Because every adder is carry-free, each level costs the same constant delay,
// two full adders, so the whole tree is 2*ceil(log2(ROWS)) full-adder delays deep.
//
// Interface: rows[j][k] is digit k of input row j; sum is their sum modulo the chosen modulus.
// Timing: purely combinational.
module posneg_reduction_tree
  import posneg_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned ROWS    = N,
  parameter modulus_e    MODULUS = MOD_2N_M1
) (
  input  pn_digit_t [ROWS-1:0][N-1:0] rows,
  output pn_digit_t [N-1:0]           sum
);
  localparam int unsigned LEVELS = $clog2(ROWS);

  // Number of rows at level l of the tree.
  function automatic int unsigned rows_at(input int unsigned l);
    return (ROWS + (1 << l) - 1) >> l;
  endfunction

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    pn_digit_t [rows_at(l)-1:0][N-1:0] r;
    if (l == 0) begin : g_in
      assign r = rows;
    end else begin : g_add
      for (genvar j = 0; j < rows_at(l); j++) begin : g_node
        if (2*j + 1 < rows_at(l-1)) begin : g_pair
          posneg_rns_adder #(.N(N), .MODULUS(MODULUS)) u_add (
            .x(g_lvl[l-1].r[2*j]),
            .y(g_lvl[l-1].r[2*j+1]),
            .s(r[j])
          );
        end else begin : g_pass
          assign r[j] = g_lvl[l-1].r[2*j];
        end
      end
    end
  end

  assign sum = g_lvl[LEVELS].r[0];
endmodule
