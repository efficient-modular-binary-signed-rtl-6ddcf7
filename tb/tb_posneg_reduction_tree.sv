// tb_posneg_reduction_tree: test of the adder tree that sums the partial products.
//
// Trees of 8 rows of 8 digits (three levels, the size of the published multiplier) and, to
// cover the pass-through of an unpaired row, 5 rows of 5 digits, each in all three moduli.
// Random rows are applied; the sum must be congruent to the sum of the row values.
module tb_posneg_reduction_tree;
  import posneg_pkg::*;
  import tb_pn_pkg::*;

  pn_digit_t [7:0][7:0] rows8;
  pn_digit_t [7:0]      sum8 [3];
  pn_digit_t [4:0][4:0] rows5;
  pn_digit_t [4:0]      sum5 [3];
  int checks = 0, failures = 0;

  posneg_reduction_tree #(.N(8), .ROWS(8), .MODULUS(MOD_2N_M1)) dut8_m1 (.rows(rows8), .sum(sum8[0]));
  posneg_reduction_tree #(.N(8), .ROWS(8), .MODULUS(MOD_2N))    dut8_m  (.rows(rows8), .sum(sum8[1]));
  posneg_reduction_tree #(.N(8), .ROWS(8), .MODULUS(MOD_2N_P1)) dut8_p1 (.rows(rows8), .sum(sum8[2]));
  posneg_reduction_tree #(.N(5), .ROWS(5), .MODULUS(MOD_2N_M1)) dut5_m1 (.rows(rows5), .sum(sum5[0]));
  posneg_reduction_tree #(.N(5), .ROWS(5), .MODULUS(MOD_2N))    dut5_m  (.rows(rows5), .sum(sum5[1]));
  posneg_reduction_tree #(.N(5), .ROWS(5), .MODULUS(MOD_2N_P1)) dut5_p1 (.rows(rows5), .sum(sum5[2]));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint total8, total5, m;
    for (int t = 0; t < 20000; t++) begin
      total8 = 0;
      total5 = 0;
      for (int j = 0; j < 8; j++) begin
        rows8[j] = 16'(pn_random(8));
        total8  += pn_value(pnvec_t'(rows8[j]), 8);
      end
      for (int j = 0; j < 5; j++) begin
        rows5[j] = 10'(pn_random(5));
        total5  += pn_value(pnvec_t'(rows5[j]), 5);
      end
      #1;
      for (int kind = 0; kind < 3; kind++) begin
        m = modulus(kind, 8);
        checks++;
        if (modp(pn_value(pnvec_t'(sum8[kind]), 8), m) != modp(total8, m)) begin
          failures++;
          if (failures < 10) $display("FAIL n=8 kind %0d", kind);
        end
        m = modulus(kind, 5);
        checks++;
        if (modp(pn_value(pnvec_t'(sum5[kind]), 5), m) != modp(total5, m)) begin
          failures++;
          if (failures < 10) $display("FAIL n=5 kind %0d", kind);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
