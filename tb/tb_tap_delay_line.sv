// tb_tap_delay_line: checks the sample delay line against a software shift
// register. Random samples are offered with a random shift strobe; after every
// clock each tap must equal the model. Reset behaviour (all taps zero) is
// checked first.
module tb_tap_delay_line;
  localparam int W = 16, DEPTH = 24;
  logic clk = 1'b0, rst, shift;
  logic signed [W-1:0] din;
  logic signed [W-1:0] taps [DEPTH];
  logic signed [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  tap_delay_line #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst, .shift, .din, .taps);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k < DEPTH; k++) begin
      checks++;
      if (taps[k] !== model[k]) begin
        failures++;
        $display("tap %0d: got %0d expected %0d", k, taps[k], model[k]);
      end
    end
  endtask

  initial begin
    rst = 1'b1; shift = 1'b0; din = '0;
    foreach (model[k]) model[k] = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    compare();
    for (int i = 0; i < 400; i++) begin
      shift = ($urandom_range(0, 3) != 0);
      din   = W'($urandom);
      @(posedge clk);
      if (shift) begin
        for (int k = DEPTH - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = din;
      end
      #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
