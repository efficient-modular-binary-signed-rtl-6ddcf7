// tb_posneg_digit_mul: exhaustive test of the Pos-Neg digit product.
// For all 16 input pairs: the value of z must be the product of the values of x and y, and the
// encoding must follow the digit-production table: a zero x is passed on as it is, a zero y
// (with nonzero x) likewise, +1 is 11 and -1 is 00.
module tb_posneg_digit_mul;
  import posneg_pkg::*;

  pn_digit_t x, y, z;
  int checks = 0, failures = 0;

  posneg_digit_mul dut (.*);

  function automatic int dval(input pn_digit_t d);
    return int'(d.pos) + int'(d.neg) - 1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pn_digit_t want;
    for (int v = 0; v < 16; v++) begin
      {x, y} = 4'(v);
      #1;
      checks += 2;
      if (dval(z) != dval(x) * dval(y)) begin
        failures++;
        $display("FAIL value x=%b y=%b z=%b", x, y, z);
      end
      if (dval(x) == 0)       want = x;
      else if (dval(y) == 0)  want = y;
      else if (dval(x) == dval(y)) want = 2'b11;
      else                    want = 2'b00;
      if (z != want) begin
        failures++;
        $display("FAIL encoding x=%b y=%b z=%b want %b", x, y, z, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
