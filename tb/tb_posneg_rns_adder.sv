// tb_posneg_rns_adder: test of the modular Pos-Neg BSD adder for all three moduli.
//
// Three 4-digit adders (moduli 15, 16, 17) and three 8-digit adders (255, 256, 257) share their
// inputs. Checks:
//   1. The worked example X = (1 -1 1 1), Y = (1 1 -1 0) with n = 4: every output bit is
//      compared with the posibit and negabit rows of the published example for each modulus,
//      and the values must be 2, 1 and 0.
//   2. All 65536 pairs of 4-digit operands: the sum must be congruent to x + y.
//   3. 20000 random 8-digit pairs, the same congruence.
// It also counts how often the end-around signals leaving the top were set, so that the
// wrap-around, the drop (modulus 2^n) and the inverted re-entry (2^n+1) all took place.
module tb_posneg_rns_adder;
  import posneg_pkg::*;
  import tb_pn_pkg::*;

  pn_digit_t [3:0] x4, y4, s4_m1, s4_m, s4_p1;
  pn_digit_t [7:0] x8, y8, s8_m1, s8_m, s8_p1;
  int checks = 0, failures = 0;
  int wraps_m1 = 0, drops_m = 0, wraps_p1 = 0;

  posneg_rns_adder #(.N(4), .MODULUS(MOD_2N_M1)) dut4_m1 (.x(x4), .y(y4), .s(s4_m1));
  posneg_rns_adder #(.N(4), .MODULUS(MOD_2N))    dut4_m  (.x(x4), .y(y4), .s(s4_m));
  posneg_rns_adder #(.N(4), .MODULUS(MOD_2N_P1)) dut4_p1 (.x(x4), .y(y4), .s(s4_p1));
  posneg_rns_adder #(.N(8), .MODULUS(MOD_2N_M1)) dut8_m1 (.x(x8), .y(y8), .s(s8_m1));
  posneg_rns_adder #(.N(8), .MODULUS(MOD_2N))    dut8_m  (.x(x8), .y(y8), .s(s8_m));
  posneg_rns_adder #(.N(8), .MODULUS(MOD_2N_P1)) dut8_p1 (.x(x8), .y(y8), .s(s8_p1));

  task automatic expect_eq(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  task automatic check_sum(input pnvec_t x, input pnvec_t y, input pnvec_t s, input int kind,
                           input int n);
    longint m;
    m = modulus(kind, n);
    expect_eq(modp(pn_value(s, n), m), modp(pn_value(x, n) + pn_value(y, n), m), "sum");
  endtask

  // Top signals of the 4-digit adders, for the mechanism counts.
  always @(x4, y4) begin
    #0;
    if (dut4_m1.d[3] || dut4_m1.neg_up[3]) wraps_m1++;
    if (dut4_m.d[3]  || dut4_m.neg_up[3])  drops_m++;
    if (dut4_p1.d[3] || dut4_p1.neg_up[3]) wraps_p1++;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1. Worked example, digits written most significant first: X = 1 -1 1 1, Y = 1 1 -1 0
    //    with the zero of Y encoded as posibit 0, negabit 1.
    x4 = {2'b11, 2'b00, 2'b11, 2'b11};
    y4 = {2'b11, 2'b11, 2'b00, 2'b01};
    #1;
    // posibit rows (s^+) and negabit rows (s^-), position 3 down to 0
    expect_eq({s4_m1[3].pos, s4_m1[2].pos, s4_m1[1].pos, s4_m1[0].pos}, 4'b0110, "ex m1 s+");
    expect_eq({s4_m1[3].neg, s4_m1[2].neg, s4_m1[1].neg, s4_m1[0].neg}, 4'b1011, "ex m1 s-");
    expect_eq({s4_m[3].pos,  s4_m[2].pos,  s4_m[1].pos,  s4_m[0].pos},  4'b0111, "ex m s+");
    expect_eq({s4_m[3].neg,  s4_m[2].neg,  s4_m[1].neg,  s4_m[0].neg},  4'b1001, "ex m s-");
    expect_eq({s4_p1[3].pos, s4_p1[2].pos, s4_p1[1].pos, s4_p1[0].pos}, 4'b0111, "ex p1 s+");
    expect_eq({s4_p1[3].neg, s4_p1[2].neg, s4_p1[1].neg, s4_p1[0].neg}, 4'b1000, "ex p1 s-");
    expect_eq(pn_value(pnvec_t'(s4_m1), 4), 2, "ex m1 value");
    expect_eq(pn_value(pnvec_t'(s4_m), 4),  1, "ex m value");
    expect_eq(pn_value(pnvec_t'(s4_p1), 4), 0, "ex p1 value");

    // 2. Exhaustive over 4-digit operands.
    for (int v = 0; v < 65536; v++) begin
      {x4, y4} = 16'(v);
      #1;
      check_sum(pnvec_t'(x4), pnvec_t'(y4), pnvec_t'(s4_m1), 0, 4);
      check_sum(pnvec_t'(x4), pnvec_t'(y4), pnvec_t'(s4_m),  1, 4);
      check_sum(pnvec_t'(x4), pnvec_t'(y4), pnvec_t'(s4_p1), 2, 4);
    end

    // 3. Random 8-digit operands.
    for (int t = 0; t < 20000; t++) begin
      x8 = 16'(pn_random(8));
      y8 = 16'(pn_random(8));
      #1;
      check_sum(pnvec_t'(x8), pnvec_t'(y8), pnvec_t'(s8_m1), 0, 8);
      check_sum(pnvec_t'(x8), pnvec_t'(y8), pnvec_t'(s8_m),  1, 8);
      check_sum(pnvec_t'(x8), pnvec_t'(y8), pnvec_t'(s8_p1), 2, 8);
    end

    $display("end-around: 2^n-1 %0d, 2^n dropped %0d, 2^n+1 inverted %0d",
             wraps_m1, drops_m, wraps_p1);
    checks += 3;
    if (wraps_m1 == 0) failures++;
    if (drops_m == 0)  failures++;
    if (wraps_p1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
