// tb_posneg_cell: exhaustive test of one Pos-Neg adder position.
// All 32 combinations of x, y and the incoming carry are applied. The checks are that the
// five input bits sum to s_pos + 2*(d_out + s_neg_up), that the carry to the next position
// depends only on x^+, x^- and y^+ (their majority), and that the outputs match the full-adder
// equations worked out here.
module tb_posneg_cell;
  import posneg_pkg::*;

  pn_digit_t x, y;
  logic      d_in, d_out, s_pos, s_neg_up;
  int        checks = 0, failures = 0;

  posneg_cell dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, u, exp_d, exp_s, exp_c;
    for (int v = 0; v < 32; v++) begin
      {x, y, d_in} = 5'(v);
      #1;
      total = int'(x.pos) + int'(x.neg) + int'(y.pos) + int'(y.neg) + int'(d_in);
      u     = (int'(x.pos) + int'(x.neg) + int'(y.pos)) % 2;
      exp_d = (int'(x.pos) + int'(x.neg) + int'(y.pos)) / 2;
      exp_s = (int'(y.neg) + int'(d_in) + u) % 2;
      exp_c = (int'(y.neg) + int'(d_in) + u) / 2;
      checks += 4;
      if (total != int'(s_pos) + 2 * (int'(d_out) + int'(s_neg_up))) failures++;
      if (int'(d_out) != exp_d) failures++;
      if (int'(s_pos) != exp_s) failures++;
      if (int'(s_neg_up) != exp_c) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
