// tb_da_piso: loads random words into the serial registers and checks that
// bits[k] shows bit n of word k in the n-th enabled cycle after the load
// (LSB first), with random clock-enable gaps that must freeze the output.
module tb_da_piso;
  localparam int N = 13, W = 17;
  logic clk = 1'b0, rst, en, load;
  logic signed [W-1:0] par_in [N];
  logic        [N-1:0] bits;
  logic        [W-1:0] words [N];
  int checks = 0, failures = 0, stalls = 0;

  da_piso #(.N(N), .W(W)) dut (.clk, .rst, .en, .load, .par_in, .bits);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0; load = 1'b0;
    foreach (par_in[k]) par_in[k] = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    checks++;
    if (bits !== '0) failures++;
    for (int s = 0; s < 60; s++) begin
      foreach (par_in[k]) begin
        par_in[k] = W'($urandom);
        words[k]  = par_in[k];
      end
      en = 1'b1; load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      for (int n = 0; n < W; n++) begin
        for (int k = 0; k < N; k++) begin
          checks++;
          if (bits[k] !== words[k][n]) begin
            failures++;
            $display("word %0d bit %0d: got %b expected %b", k, n, bits[k], words[k][n]);
          end
        end
        // random stall: output must hold
        while ($urandom_range(0, 3) == 0) begin
          en = 1'b0;
          @(posedge clk); #1;
          stalls++;
          for (int k = 0; k < N; k++) begin
            checks++;
            if (bits[k] !== words[k][n]) failures++;
          end
        end
        en = 1'b1;
        @(posedge clk); #1;
      end
    end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
