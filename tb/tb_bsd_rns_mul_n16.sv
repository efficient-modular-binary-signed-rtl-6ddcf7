// tb_bsd_rns_mul_n16: the end-to-end test of tb_bsd_rns_mul run at the larger evaluated size,
// n = 16 (moduli 65535, 65536, 65537, dynamic range about 2^48), with the multiplier's N set to
// 16. Each trial multiplies two random signed integers in residue form, checks every product
// residue and the Chinese-remainder reconstruction of the product, and the run counts that each
// mechanism (digit-product cases, negated rotation, wrapped, dropped and inverted carries)
// occurred.
module tb_bsd_rns_mul_n16;
  import posneg_pkg::*;
  import tb_pn_pkg::*;

  localparam int N      = 16;
  localparam int LEVELS = $clog2(N);
  localparam int TRIALS = 10000;

  pn_digit_t [N-1:0] x [3];
  pn_digit_t [N-1:0] y [3];
  pn_digit_t [N-1:0] p [3];
  int checks = 0, failures = 0;
  int cnt_zero_x = 0, cnt_zero_y = 0, cnt_same = 0, cnt_opp = 0, cnt_neg_rot = 0;
  int cnt_wrap_m1 = 0, cnt_drop_m = 0, cnt_inv_p1 = 0, cnt_negative = 0;

  bsd_rns_mul #(.N(N)) dut (
    .x_m1(x[0]), .y_m1(y[0]), .x_m(x[1]), .y_m(y[1]), .x_p1(x[2]), .y_p1(y[2]),
    .p_m1(p[0]), .p_m(p[1]), .p_p1(p[2])
  );

  function automatic int dval(input pn_digit_t d);
    return int'(d.pos) + int'(d.neg) - 1;
  endfunction

  // Inverse of a modulo m by the extended Euclidean algorithm (a and m coprime).
  function automatic longint inv_mod(input longint a, input longint m);
    longint t, nt, r, nr, q, tmp;
    t = 0; nt = 1; r = m; nr = modp(a, m);
    while (nr != 0) begin
      q = r / nr;
      tmp = t - q * nt; t = nt; nt = tmp;
      tmp = r - q * nr; r = nr; nr = tmp;
    end
    return modp(t, m);
  endfunction

  task automatic count_mechanisms();
    for (int c = 0; c < 3; c++)
      for (int i = 0; i < N; i++)
        for (int k = 0; k < N; k++) begin
          if (dval(x[c][k]) == 0)      cnt_zero_x++;
          else if (dval(y[c][i]) == 0) cnt_zero_y++;
          else if (dval(x[c][k]) == dval(y[c][i])) cnt_same++;
          else cnt_opp++;
          if (c == 2 && k > N - 1 - i && dval(x[c][k]) * dval(y[c][i]) != 0) cnt_neg_rot++;
        end
    if (dut.u_mul_m1.u_tree.g_lvl[LEVELS].g_add.g_node[0].g_pair.u_add.d[N-1] ||
        dut.u_mul_m1.u_tree.g_lvl[LEVELS].g_add.g_node[0].g_pair.u_add.neg_up[N-1])
      cnt_wrap_m1++;
    if (dut.u_mul_m.u_tree.g_lvl[LEVELS].g_add.g_node[0].g_pair.u_add.d[N-1] ||
        dut.u_mul_m.u_tree.g_lvl[LEVELS].g_add.g_node[0].g_pair.u_add.neg_up[N-1])
      cnt_drop_m++;
    if (dut.u_mul_p1.u_tree.g_lvl[LEVELS].g_add.g_node[0].g_pair.u_add.d[N-1] ||
        dut.u_mul_p1.u_tree.g_lvl[LEVELS].g_add.g_node[0].g_pair.u_add.neg_up[N-1])
      cnt_inv_p1++;
  endtask

  task automatic need(input int count, input string what);
    $display("%-40s %0d", what, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint m [3];
    longint big_m, a, b, r, crt_m, term;
    logic [127:0] prod_mod_m, acc;
    bit random_bits;

    for (int c = 0; c < 3; c++) m[c] = modulus(c, N);
    big_m = m[0] * m[1] * m[2];

    for (int t = 0; t < TRIALS; t++) begin
      random_bits = (t % 4 == 3);
      a = modp(longint'({$urandom, $urandom}), big_m) - big_m / 2 + 1;
      b = modp(longint'({$urandom, $urandom}), big_m) - big_m / 2 + 1;
      if (t == 0) begin a = big_m / 2; b = -1; end
      if (a < 0 || b < 0) cnt_negative++;
      for (int c = 0; c < 3; c++) begin
        if (random_bits) begin
          x[c] = (2 * N)'(pn_random(N));
          y[c] = (2 * N)'(pn_random(N));
        end else begin
          x[c] = (2 * N)'(pn_encode(residue_repr(modp(a, m[c]), m[c], N), N));
          y[c] = (2 * N)'(pn_encode(residue_repr(modp(b, m[c]), m[c], N), N));
        end
      end
      #1;
      count_mechanisms();
      // product modulo M of the operand values, from the residues actually applied
      if (random_bits) begin
        // rebuild the operands from their residues first
        a = 0; b = 0;
        acc = 0;
        for (int c = 0; c < 3; c++) begin
          crt_m = big_m / m[c];
          term  = modp(pn_value(pnvec_t'(x[c]), N), m[c]) * inv_mod(crt_m, m[c]) % m[c];
          acc   = (acc + 128'(term) * 128'(crt_m)) % 128'(big_m);
        end
        a = longint'(acc);
        acc = 0;
        for (int c = 0; c < 3; c++) begin
          crt_m = big_m / m[c];
          term  = modp(pn_value(pnvec_t'(y[c]), N), m[c]) * inv_mod(crt_m, m[c]) % m[c];
          acc   = (acc + 128'(term) * 128'(crt_m)) % 128'(big_m);
        end
        b = longint'(acc);
      end
      prod_mod_m = 128'(modp(a, big_m)) * 128'(modp(b, big_m)) % 128'(big_m);
      // per-channel congruence
      for (int c = 0; c < 3; c++) begin
        r = modp(pn_value(pnvec_t'(p[c]), N), m[c]);
        checks++;
        if (128'(r) != prod_mod_m % 128'(m[c])) begin
          failures++;
          if (failures < 10) $display("FAIL channel %0d: A=%0d B=%0d got %0d", c, a, b, r);
        end
      end
      // Chinese remainder reconstruction of the product
      acc = 0;
      for (int c = 0; c < 3; c++) begin
        crt_m = big_m / m[c];
        term  = modp(pn_value(pnvec_t'(p[c]), N), m[c]) * inv_mod(crt_m, m[c]) % m[c];
        acc   = (acc + 128'(term) * 128'(crt_m)) % 128'(big_m);
      end
      checks++;
      if (acc != prod_mod_m) begin
        failures++;
        if (failures < 10) $display("FAIL CRT: A=%0d B=%0d got %0d want %0d", a, b, acc, prod_mod_m);
      end
    end

    need(cnt_negative, "signed operand below zero");
    need(cnt_zero_x,   "digit product, x digit zero");
    need(cnt_zero_y,   "digit product, y digit zero");
    need(cnt_same,     "digit product, equal signs");
    need(cnt_opp,      "digit product, opposite signs");
    need(cnt_neg_rot,  "nonzero digit rotated in negated");
    need(cnt_wrap_m1,  "carry wrapped round, 2^n-1");
    need(cnt_drop_m,   "carry dropped, 2^n");
    need(cnt_inv_p1,   "carry re-entered inverted, 2^n+1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
