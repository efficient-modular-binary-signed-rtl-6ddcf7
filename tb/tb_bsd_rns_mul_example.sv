// tb_bsd_rns_mul_example: the multiplier at n = 4 (moduli 15, 16, 17, dynamic range 4080) run
// on the small worked example of this number system.
//
// A = 137 has residues 2, 9 and 1. Their Pos-Neg encodings, most significant digit first, are
// taken as (01 11 00 01), (11 01 11 00) and (01 10 11 00); the first has a leading zero digit
// added to make four digits. The test checks that those patterns have the values 2, 9 and 1 and
// that squaring them gives residues whose Chinese-remainder reconstruction is
// 137^2 mod 4080 = 2449. It then multiplies 137 by every integer B in (-2040, 2040], each time
// with a fresh random redundant encoding of B's residues, and checks the reconstructed product.
module tb_bsd_rns_mul_example;
  import posneg_pkg::*;
  import tb_pn_pkg::*;

  localparam int N = 4;

  pn_digit_t [N-1:0] x [3];
  pn_digit_t [N-1:0] y [3];
  pn_digit_t [N-1:0] p [3];
  int checks = 0, failures = 0;

  bsd_rns_mul #(.N(N)) dut (
    .x_m1(x[0]), .y_m1(y[0]), .x_m(x[1]), .y_m(y[1]), .x_p1(x[2]), .y_p1(y[2]),
    .p_m1(p[0]), .p_m(p[1]), .p_p1(p[2])
  );

  longint m [3];
  longint big_m;

  // Product modulo M rebuilt from the three output residues. With the moduli 15, 16, 17 the
  // reconstruction weights are sum_c r_c * (M/m_c) * |(M/m_c)^-1|_{m_c}; the inverses are found
  // by search, the moduli being small.
  function automatic longint crt();
    longint acc, mc, inv;
    acc = 0;
    for (int c = 0; c < 3; c++) begin
      mc  = big_m / m[c];
      inv = 0;
      for (longint k = 1; k < m[c]; k++) if ((mc * k) % m[c] == 1) inv = k;
      acc += modp(pn_value(pnvec_t'(p[c]), N), m[c]) * mc % big_m * inv;
    end
    return modp(acc, big_m);
  endfunction

  task automatic expect_eq(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d want %0d", what, got, want);
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
    longint a, want;
    for (int c = 0; c < 3; c++) m[c] = modulus(c, N);
    big_m = m[0] * m[1] * m[2];
    a = 137;

    x[0] = 8'b01_11_00_01;
    x[1] = 8'b11_01_11_00;
    x[2] = 8'b01_10_11_00;
    y = x;
    #1;
    expect_eq(pn_value(pnvec_t'(x[0]), N), 2, "A mod 15");
    expect_eq(pn_value(pnvec_t'(x[1]), N), 9, "A mod 16");
    expect_eq(pn_value(pnvec_t'(x[2]), N), 1, "A mod 17");
    expect_eq(crt(), 2449, "137^2 mod 4080");
    $display("137^2 mod 4080 from the residue channels: %0d", crt());

    for (longint b = -big_m / 2 + 1; b <= big_m / 2; b++) begin
      for (int c = 0; c < 3; c++)
        y[c] = (2 * N)'(pn_encode(residue_repr(modp(b, m[c]), m[c], N), N));
      #1;
      want = modp(a * b, big_m);
      expect_eq(crt(), want, "137*B");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
