// tb_sym_preadder: random and extreme windows are applied to the symmetric
// pre-adder; every fold sum is compared with a sum computed in 32-bit
// integers, including the unchanged centre tap.
module tb_sym_preadder;
  localparam int W = 16, NTAPS = 25, NUNIQ = 13;
  logic signed [W-1:0] win  [NTAPS];
  logic signed [W:0]   sums [NUNIQ];
  int checks = 0, failures = 0;

  sym_preadder #(.W(W), .NTAPS(NTAPS)) dut (.win, .sums);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < NTAPS; k++) begin
        case (t)
          0: win[k] = -16'sd32768;
          1: win[k] = 16'sd32767;
          default: win[k] = W'($urandom);
        endcase
      end
      #1;
      for (int k = 0; k < NUNIQ; k++) begin
        int exp_v;
        exp_v = (k < NTAPS / 2) ? int'(win[k]) + int'(win[NTAPS-1-k]) : int'(win[k]);
        checks++;
        if (int'(sums[k]) != exp_v) begin
          failures++;
          $display("t=%0d sum %0d: got %0d expected %0d", t, k, sums[k], exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
