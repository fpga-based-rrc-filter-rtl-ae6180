// tb_shift_accumulator: feeds B = 17 random partial products per word (first
// flag on bit 0, last flag on the sign bit) and checks that result equals
// sum p_n*2^n - p_16*2^16, computed in 64-bit integers, and that valid pulses
// for exactly one cycle after the sign-bit step. Clock-enable gaps are
// inserted at random.
module tb_shift_accumulator;
  localparam int P_W = 20, B = 17, ACC_W = P_W + B;
  logic clk = 1'b0, rst, en, first, last;
  logic signed [P_W-1:0] p;
  logic signed [ACC_W-1:0] result;
  logic valid;
  int checks = 0, failures = 0, stalls = 0;

  shift_accumulator #(.P_W(P_W), .B(B)) dut (.clk, .rst, .en, .first, .last, .p, .result, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expv;
    rst = 1'b1; en = 1'b0; first = 1'b0; last = 1'b0; p = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int w = 0; w < 200; w++) begin
      expv = 0;
      for (int n = 0; n < B; n++) begin
        logic signed [P_W-1:0] pv;
        pv = (w == 0) ? -(2**(P_W-1)) : (w == 1) ? (2**(P_W-1)) - 1 : P_W'($urandom);
        while ($urandom_range(0, 4) == 0) begin
          en = 1'b0; p = P_W'($urandom);
          @(posedge clk); #1;
          stalls++;
          checks++;
          if (valid) failures++;
        end
        en = 1'b1; first = (n == 0); last = (n == B - 1); p = pv;
        if (n == B - 1) expv -= longint'(pv) <<< n;
        else            expv += longint'(pv) <<< n;
        @(posedge clk); #1;
        checks++;
        if (valid !== (n == B - 1)) begin
          failures++;
          $display("word %0d bit %0d: valid=%b", w, n, valid);
        end
      end
      checks++;
      if (longint'(result) != expv) begin
        failures++;
        $display("word %0d: got %0d expected %0d", w, result, expv);
      end
    end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
