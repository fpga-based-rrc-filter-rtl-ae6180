// tb_da_lut_bank: applies all 2^13 address patterns to the complete LUT stage
// and compares p with the sum of the coefficients whose bit is set.
module tb_da_lut_bank;
  import rrc_pkg::*;
  logic [NUNIQ-1:0] bits;
  logic signed [P_W-1:0] p;
  int checks = 0, failures = 0;

  da_lut_bank dut (.bits, .p);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**NUNIQ; a++) begin
      int s;
      bits = NUNIQ'(a);
      s = 0;
      for (int k = 0; k < NUNIQ; k++) if (a[k]) s += int'(COEF[k]);
      #1;
      checks++;
      if (int'(p) != s) begin
        failures++;
        if (failures < 10) $display("addr %0h: got %0d expected %0d", a, p, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
