// tb_rrc_da_filter: end-to-end test of the DA raised-cosine filter at its
// default (full) size.
//
// A reference FIR with ordinary multiplications, using the 25 coefficients
// h[k] = COEF[min(k, 24-k)], predicts every output:
//   y[n] = floor( sum_k h[k] * x[n-k] / 2^16 )   (Q1.15 x Q1.15 -> Q2.14)
// Stimulus, in order: an impulse (the filter's impulse response, which must
// show the centre value 0.5 and zero crossings every second tap), a positive
// and a negative full-scale step, random full-scale samples, the worst-case
// input pattern sign(h[k]) that drives the output to its largest value, and a
// reset in the middle of a run. clk_enable is dropped at random throughout.
// Also checked: one new output (ce_out) every 17 enabled clocks, and ce_out
// never wider than one cycle. Each mechanism (stall, sign-bit subtraction
// with a negative fold sum, full-scale output, mid-run reset) is counted and
// must occur.
module tb_rrc_da_filter;
  import rrc_pkg::*;

  logic clk = 1'b0, reset, clk_enable;
  logic signed [IN_W-1:0]  filter_in;
  logic signed [OUT_W-1:0] filter_out;
  logic ce_out;

  int checks = 0, failures = 0;
  int n_stall = 0, n_neg_fold = 0, n_big_out = 0, n_reset = 0, n_samples = 0;
  int hist [$];          // newest sample first
  int en_since = 0;      // enabled clocks since the last ce_out
  bit seen_pulse = 0;

  rrc_da_filter dut (.clk, .reset, .clk_enable, .filter_in, .filter_out, .ce_out);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int h(int k);
    return int'(COEF[(k < NUNIQ) ? k : NTAPS - 1 - k]);
  endfunction

  function automatic int ref_y();
    longint acc = 0;
    for (int k = 0; k < NTAPS; k++)
      if (k < hist.size()) acc += longint'(h(k)) * longint'(hist[k]);
    return int'(acc >>> OUT_SHIFT);
  endfunction

  // Drive one sample: hold it until the filter takes it (the edge that raises
  // ce_out), then check the output produced for the previous sample.
  task automatic put(int x);
    int expv;
    filter_in = IN_W'(x);
    do begin
      clk_enable = ($urandom_range(0, 5) != 0);
      @(posedge clk); #1;
      if (clk_enable) en_since++; else n_stall++;
      checks++;
      if (ce_out && !clk_enable) begin
        failures++;
        $display("ce_out without clk_enable");
      end
    end while (!ce_out);
    expv = ref_y();
    checks++;
    if (int'(filter_out) != expv) begin
      failures++;
      $display("sample %0d: filter_out %0d expected %0d", n_samples, filter_out, expv);
    end
    if (seen_pulse) begin
      checks++;
      if (en_since != NBITS) begin
        failures++;
        $display("sample %0d: %0d enabled clocks between outputs, expected %0d",
                 n_samples, en_since, NBITS);
      end
    end
    seen_pulse = 1;
    en_since = 0;
    if (expv > 16384 || expv < -16384) n_big_out++;
    hist.push_front(x);
    if (hist.size() > NTAPS) void'(hist.pop_back());
    for (int k = 0; k < NTAPS / 2; k++)
      if (k < hist.size() && NTAPS - 1 - k < hist.size() &&
          hist[k] + hist[NTAPS-1-k] < 0) begin
        n_neg_fold++;
        break;
      end
    n_samples++;
  endtask

  task automatic do_reset();
    reset = 1'b1; clk_enable = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    reset = 1'b0;
    hist.delete();
    seen_pulse = 0;
    en_since = 0;
  endtask

  // ce_out must be a single-cycle pulse
  logic ce_prev = 1'b0;
  always @(posedge clk) begin
    if (ce_out && ce_prev) begin
      failures++;
      $display("ce_out longer than one cycle");
    end
    ce_prev <= ce_out;
  end

  initial begin
    filter_in = '0; clk_enable = 1'b0;
    do_reset();
    // first pulse after reset carries the all-zero history
    put(0);
    checks++;
    if (filter_out != 0) failures++;

    // impulse response: output k after the impulse is h[k] * (1 - 2^-15);
    // centre 0.5 (8191 in Q2.14), zero at even offsets, about 0.3 beside it
    put(32767);
    for (int i = 0; i < NTAPS + 2; i++) begin
      put(0);
      if (i < NTAPS) begin
        checks++;
        if (i == (NTAPS - 1) / 2 && int'(filter_out) != 8191) failures++;
        else if (i % 2 == 0 && i != (NTAPS - 1) / 2 && filter_out != 0) failures++;
        else if (i == (NTAPS - 1) / 2 + 1 && (int'(filter_out) < 4850 || int'(filter_out) > 4950)) failures++;
      end
    end
    // step up and down
    for (int i = 0; i < 40; i++) put(32767);
    for (int i = 0; i < 40; i++) put(-32768);
    // random full-scale samples
    for (int i = 0; i < 300; i++) put(int'($urandom_range(0, 65535)) - 32768);
    // worst-case pattern: x[n-k] = +/- full scale following sign of h[k]
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < NTAPS; i++)
        put((h(NTAPS - 1 - i) < 0) ? -32768 : 32767);
    for (int i = 0; i < NTAPS; i++)
      put((h(NTAPS - 1 - i) < 0) ? 32767 : -32768);
    // reset in the middle of a run, then random again
    for (int i = 0; i < 5; i++) put(int'($urandom_range(0, 65535)) - 32768);
    repeat ($urandom_range(1, 10)) @(posedge clk);
    do_reset();
    n_reset++;
    filter_in = '0;
    put(0);
    for (int i = 0; i < 60; i++) put(int'($urandom_range(0, 65535)) - 32768);

    $display("mechanisms: samples=%0d stalls=%0d negative_folds=%0d large_outputs=%0d resets=%0d",
             n_samples, n_stall, n_neg_fold, n_big_out, n_reset);
    checks += 4;
    if (n_stall == 0)    failures++;
    if (n_neg_fold == 0) failures++;
    if (n_big_out == 0)  failures++;
    if (n_reset == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
