// tb_da_lut: reads every address of each default LUT partition (coefficients
// 0-3, 4-7, 8-11 and the single-input partition for coefficient 12) and
// compares with the sum of the selected coefficients.
module tb_da_lut;
  import rrc_pkg::*;
  logic [3:0] a0, a1, a2;
  logic [0:0] a3;
  logic signed [LUT_W-1:0] v0, v1, v2, v3;
  int checks = 0, failures = 0;

  da_lut #(.FIRST(0), .K(4)) u0 (.addr(a0), .value(v0));
  da_lut #(.FIRST(4), .K(4)) u1 (.addr(a1), .value(v1));
  da_lut #(.FIRST(8), .K(4)) u2 (.addr(a2), .value(v2));
  da_lut #(.FIRST(12), .K(1)) u3 (.addr(a3), .value(v3));

  function automatic int ref_sum(int first, int k, int a);
    int s = 0;
    for (int i = 0; i < k; i++) if (a[i]) s += int'(COEF[first+i]);
    return s;
  endfunction

  task automatic check(int got, int expv, int part, int a);
    checks++;
    if (got != expv) begin
      failures++;
      $display("partition %0d addr %0d: got %0d expected %0d", part, a, got, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      a0 = 4'(a); a1 = 4'(a); a2 = 4'(a); a3 = 1'(a);
      #1;
      check(int'(v0), ref_sum(0, 4, a), 0, a);
      check(int'(v1), ref_sum(4, 4, a), 1, a);
      check(int'(v2), ref_sum(8, 4, a), 2, a);
      if (a < 2) check(int'(v3), ref_sum(12, 1, a), 3, a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
