// tb_posneg_ppg: test of the modular partial product generator.
//
// Generators for n = 4 and n = 8 in all three moduli. Row i must be congruent to
// y_i * X * 2^i modulo the modulus, and each of its digits must be the expected digit product:
// y_i * x_{k-i} above the rotation point and, below it, y_i * x_{n-i+k} unchanged (2^n-1),
// zero (2^n) or negated (2^n+1). n = 4 is run over all 65536 operand pairs, n = 8 over random
// pairs. The number of nonzero digits that were rotated in negated is counted and must not be
// zero.
module tb_posneg_ppg;
  import posneg_pkg::*;
  import tb_pn_pkg::*;

  pn_digit_t [3:0]       x4, y4;
  pn_digit_t [3:0][3:0]  pp4 [3];
  pn_digit_t [7:0]       x8, y8;
  pn_digit_t [7:0][7:0]  pp8 [3];
  int checks = 0, failures = 0, negated_nonzero = 0;

  posneg_ppg #(.N(4), .MODULUS(MOD_2N_M1)) dut4_m1 (.x(x4), .y(y4), .pp(pp4[0]));
  posneg_ppg #(.N(4), .MODULUS(MOD_2N))    dut4_m  (.x(x4), .y(y4), .pp(pp4[1]));
  posneg_ppg #(.N(4), .MODULUS(MOD_2N_P1)) dut4_p1 (.x(x4), .y(y4), .pp(pp4[2]));
  posneg_ppg #(.N(8), .MODULUS(MOD_2N_M1)) dut8_m1 (.x(x8), .y(y8), .pp(pp8[0]));
  posneg_ppg #(.N(8), .MODULUS(MOD_2N))    dut8_m  (.x(x8), .y(y8), .pp(pp8[1]));
  posneg_ppg #(.N(8), .MODULUS(MOD_2N_P1)) dut8_p1 (.x(x8), .y(y8), .pp(pp8[2]));

  function automatic int dval(input logic [1:0] d);
    return int'(d[1]) + int'(d[0]) - 1;
  endfunction

  // Check every row of one generator; x, y, rows given as plain vectors.
  task automatic check_rows(input pnvec_t x, input pnvec_t y, input logic [2047:0] rows,
                            input int kind, input int n);
    longint m, want;
    int     dx, dy, dz, want_d;
    logic [1:0] dig;
    m = modulus(kind, n);
    for (int i = 0; i < n; i++) begin
      pnvec_t row;
      row = '0;
      for (int b = 0; b < 2 * n; b++) row[b] = rows[2 * n * i + b];
      dy = dval(y[2*i +: 2]);
      want = modp(longint'(dy) * pn_value(x, n) * (longint'(1) << i), m);
      checks++;
      if (modp(pn_value(row, n), m) != want) begin
        failures++;
        if (failures < 10) $display("FAIL row %0d kind %0d n %0d", i, kind, n);
      end
      for (int k = 0; k < n; k++) begin
        dig = row[2*k +: 2];
        dz  = dval(dig);
        if (k >= i) begin
          dx = dval(x[2*(k-i) +: 2]);
          want_d = dx * dy;
        end else begin
          dx = dval(x[2*(n-i+k) +: 2]);
          want_d = (kind == 0) ? dx * dy : (kind == 1) ? 0 : -dx * dy;
          if (kind == 2 && dx * dy != 0) negated_nonzero++;
        end
        checks++;
        if (dz != want_d) begin
          failures++;
          if (failures < 10) $display("FAIL digit %0d of row %0d kind %0d n %0d", k, i, kind, n);
        end
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {x4, y4} = 16'(v);
      #1;
      for (int kind = 0; kind < 3; kind++)
        check_rows(pnvec_t'(x4), pnvec_t'(y4), 2048'(pp4[kind]), kind, 4);
    end
    for (int t = 0; t < 5000; t++) begin
      x8 = 16'(pn_random(8));
      y8 = 16'(pn_random(8));
      #1;
      for (int kind = 0; kind < 3; kind++)
        check_rows(pnvec_t'(x8), pnvec_t'(y8), 2048'(pp8[kind]), kind, 8);
    end
    $display("nonzero digits rotated in negated: %0d", negated_nonzero);
    checks++;
    if (negated_nonzero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
