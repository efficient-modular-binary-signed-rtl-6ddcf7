// tb_posneg_rns_mul: test of the single-modulus Pos-Neg BSD-RNS multiplier.
//
// Multipliers for n = 4 (moduli 15, 16, 17), n = 5 (an odd partial product count) and n = 8
// (255, 256, 257). n = 4 is run over all 65536 operand pairs; n = 5 and n = 8 over random
// operands, both random bit patterns and random redundant encodings of random residues. The
// product must be congruent to the product of the operand values.
module tb_posneg_rns_mul;
  import posneg_pkg::*;
  import tb_pn_pkg::*;

  pn_digit_t [3:0] x4, y4;
  pn_digit_t [3:0] p4 [3];
  pn_digit_t [4:0] x5, y5;
  pn_digit_t [4:0] p5 [3];
  pn_digit_t [7:0] x8, y8;
  pn_digit_t [7:0] p8 [3];
  int checks = 0, failures = 0;

  posneg_rns_mul #(.N(4), .MODULUS(MOD_2N_M1)) dut4_m1 (.x(x4), .y(y4), .p(p4[0]));
  posneg_rns_mul #(.N(4), .MODULUS(MOD_2N))    dut4_m  (.x(x4), .y(y4), .p(p4[1]));
  posneg_rns_mul #(.N(4), .MODULUS(MOD_2N_P1)) dut4_p1 (.x(x4), .y(y4), .p(p4[2]));
  posneg_rns_mul #(.N(5), .MODULUS(MOD_2N_M1)) dut5_m1 (.x(x5), .y(y5), .p(p5[0]));
  posneg_rns_mul #(.N(5), .MODULUS(MOD_2N))    dut5_m  (.x(x5), .y(y5), .p(p5[1]));
  posneg_rns_mul #(.N(5), .MODULUS(MOD_2N_P1)) dut5_p1 (.x(x5), .y(y5), .p(p5[2]));
  posneg_rns_mul #(.N(8), .MODULUS(MOD_2N_M1)) dut8_m1 (.x(x8), .y(y8), .p(p8[0]));
  posneg_rns_mul #(.N(8), .MODULUS(MOD_2N))    dut8_m  (.x(x8), .y(y8), .p(p8[1]));
  posneg_rns_mul #(.N(8), .MODULUS(MOD_2N_P1)) dut8_p1 (.x(x8), .y(y8), .p(p8[2]));

  task automatic check_prod(input pnvec_t x, input pnvec_t y, input pnvec_t p, input int kind,
                            input int n);
    longint m;
    m = modulus(kind, n);
    checks++;
    if (modp(pn_value(p, n), m) != modp(pn_value(x, n) * pn_value(y, n), m)) begin
      failures++;
      if (failures < 10)
        $display("FAIL n=%0d kind %0d: x=%0d y=%0d p=%0d", n, kind, pn_value(x, n),
                 pn_value(y, n), pn_value(p, n));
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
        check_prod(pnvec_t'(x4), pnvec_t'(y4), pnvec_t'(p4[kind]), kind, 4);
    end
    for (int t = 0; t < 20000; t++) begin
      if (t % 2 == 0) begin
        x5 = 10'(pn_random(5));
        y5 = 10'(pn_random(5));
        x8 = 16'(pn_random(8));
        y8 = 16'(pn_random(8));
      end else begin
        x5 = 10'(pn_encode(longint'($urandom_range(62)) - 31, 5));
        y5 = 10'(pn_encode(longint'($urandom_range(62)) - 31, 5));
        x8 = 16'(pn_encode(longint'($urandom_range(510)) - 255, 8));
        y8 = 16'(pn_encode(longint'($urandom_range(510)) - 255, 8));
      end
      #1;
      for (int kind = 0; kind < 3; kind++) begin
        check_prod(pnvec_t'(x5), pnvec_t'(y5), pnvec_t'(p5[kind]), kind, 5);
        check_prod(pnvec_t'(x8), pnvec_t'(y8), pnvec_t'(p8[kind]), kind, 8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
