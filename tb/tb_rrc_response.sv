// tb_rrc_response: measures the filter the way its design was specified,
// against real-valued arithmetic that does not use the coefficient table.
//
//  1. Coefficients: every rrc_pkg::COEF entry must equal
//     round(2^15 * rc(n) * w(n)) recomputed here with $sin/$cos/$exp.
//  2. Impulse response: a full-scale impulse through the DA filter must give
//     the windowed raised-cosine samples, within 1.5 output LSB.
//  3. Magnitude response at a 48 kHz sample rate, from tones of amplitude
//     0.9: 3 kHz passes unchanged (within 0.1 dB), 12 kHz (half the symbol
//     rate of 24 kBd) is at -6.02 dB (within 0.2 dB), 20 kHz and 22 kHz are
//     attenuated by more than 50 dB.
// Runs the top module at its default parameters.
module tb_rrc_response;
  import rrc_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real FS = 48000.0;
  localparam int  NMEAS = 96;

  logic clk = 1'b0, reset, clk_enable;
  logic signed [IN_W-1:0]  filter_in;
  logic signed [OUT_W-1:0] filter_out;
  logic ce_out;
  int checks = 0, failures = 0;

  rrc_da_filter dut (.clk, .reset, .clk_enable, .filter_in, .filter_out, .ce_out);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real h_real(int k);
    real n, t, s, d, rc, w;
    n = real'(k - (NTAPS - 1) / 2);
    t = n / 2.0;
    if (k == (NTAPS - 1) / 2) return 0.5;
    s = $sin(PI * t) / (PI * t);
    d = 1.0 - (2.0 * 0.5 * t) ** 2;
    w = $exp(-0.5 * (0.5 * n / 12.0) ** 2);
    // removable singularity at t = 1/(2*beta): limit is (pi/4) * sinc(t) / L
    if (d < 1.0e-9 && d > -1.0e-9) return 0.5 * (PI / 4.0) * s * w;
    rc = 0.5 * s * $cos(PI * 0.5 * t) / d;
    return rc * w;
  endfunction

  // one sample in, the output of the previous sample out
  task automatic put(int x, output real y);
    filter_in = IN_W'(x);
    do @(posedge clk); while (!ce_out);
    #1;
    y = real'(filter_out) / 16384.0;
  endtask

  task automatic restart();
    reset = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    reset = 1'b0;
  endtask

  task automatic tone(real f, output real gain_db);
    real y, c, s, amp;
    c = 0.0; s = 0.0;
    restart();
    for (int i = 0; i < NTAPS + NMEAS + 1; i++) begin
      put(int'($floor(0.9 * 32768.0 * $sin(2.0 * PI * f / FS * i) + 0.5)), y);
      // y belongs to input sample i-1
      if (i - 1 >= NTAPS) begin
        c += y * $cos(2.0 * PI * f / FS * (i - 1));
        s += y * $sin(2.0 * PI * f / FS * (i - 1));
      end
    end
    amp = 2.0 / NMEAS * $sqrt(c * c + s * s);
    gain_db = 20.0 * $log10(amp / 0.9 + 1.0e-12);
    $display("tone %0.0f Hz: gain %0.2f dB", f, gain_db);
  endtask

  initial begin
    real y, g, e;
    reset = 1'b1; clk_enable = 1'b1; filter_in = '0;
    // 1. coefficient table against the formula
    for (int k = 0; k < NUNIQ; k++) begin
      checks++;
      if (int'(COEF[k]) != int'($floor(h_real(k) * 32768.0 + 0.5))) begin
        failures++;
        $display("COEF[%0d] = %0d, formula gives %f", k, COEF[k], h_real(k) * 32768.0);
      end
    end
    // 2. impulse response
    restart();
    put(32767, y);
    for (int k = 0; k < NTAPS; k++) begin
      put(0, y);
      e = h_real(k) * 32767.0 / 32768.0;
      checks++;
      if ((y - e) * 16384.0 > 1.5 || (e - y) * 16384.0 > 1.5) begin
        failures++;
        $display("impulse tap %0d: got %f expected %f", k, y, e);
      end
    end
    // 3. magnitude response
    tone(3000.0, g);
    checks++; if (g > 0.1 || g < -0.1) failures++;
    tone(12000.0, g);
    checks++; if (g > -5.82 || g < -6.22) failures++;
    tone(20000.0, g);
    checks++; if (g > -50.0) failures++;
    tone(22000.0, g);
    checks++; if (g > -50.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
