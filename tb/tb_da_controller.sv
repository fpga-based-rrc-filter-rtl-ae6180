// tb_da_controller: checks the bit sequencer: after reset the first enabled
// clock is a sample (last) cycle, then first/last recur exactly every B
// enabled clocks, and a low clk_enable freezes the count.
module tb_da_controller;
  localparam int B = 17;
  logic clk = 1'b0, rst, clk_enable, en, first, last;
  logic [$clog2(B)-1:0] bitn;
  int checks = 0, failures = 0, stalls = 0;

  da_controller #(.B(B)) dut (.clk, .rst, .clk_enable, .en, .first, .last, .bitn);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_n;
    rst = 1'b1; clk_enable = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    expect_n = B - 1;
    for (int c = 0; c < 2000; c++) begin
      clk_enable = ($urandom_range(0, 4) != 0);
      #1;
      checks += 4;
      if (int'(bitn) != expect_n) begin
        failures++;
        $display("cycle %0d: bitn %0d expected %0d", c, bitn, expect_n);
      end
      if (first !== (expect_n == 0)) failures++;
      if (last  !== (expect_n == B - 1)) failures++;
      if (en !== clk_enable) failures++;
      if (!clk_enable) stalls++;
      @(posedge clk); #1;
      if (clk_enable) expect_n = (expect_n == B - 1) ? 0 : expect_n + 1;
    end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
