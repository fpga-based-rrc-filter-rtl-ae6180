// rrc_da_filter: 25-tap raised-cosine pulse-shaping FIR filter built with
// bit-serial distributed arithmetic (no multipliers).
//
// Datapath, one sample every NBITS = 17 clocks:
//   filter_in -> tap_delay_line (24 taps) -> sym_preadder (13 sums, 17 bit)
//   -> da_piso (one bit of every sum per clock, LSB first)
//   -> da_lut_bank (partitioned coefficient-sum ROMs)
//   -> shift_accumulator (sum of p_n * 2^n, sign bit subtracted)
//   -> filter_out (Q2.14, truncated)
// da_controller counts the bit positions and marks the sample cycle.
//
// Interface: clk; reset (synchronous, active high); clk_enable (stalls the
// filter while low); filter_in (Q1.15); filter_out (Q2.14); ce_out (one-cycle
// pulse in the first cycle that shows a new filter_out).
// Timing: filter_in is sampled on the enabled clock edge that also raises
// ce_out, i.e. once every 17 enabled clocks; a source should change it in the
// cycle ce_out is high and hold it. y[n] for the sample taken on such an edge
// appears on filter_out at the next ce_out, 17 enabled clocks later:
//   y[n] = floor( sum_{k=0}^{24} h[k] * x[n-k] * 2^14 ) / 2^14.
// Order 24, roll-off 0.5, the Gaussian window, DA with symmetric folding and
// the 16-bit filter_out follow the published design. The 16-bit filter_in,
// the bit-serial schedule, the number formats, reset and the clk_enable /
// ce_out handshake are this design's choices. Only bits 31:16 of the
// accumulator result are used: the lower bits are dropped by the truncation
// to Q2.14 and the upper bits can never differ from the sign.
module rrc_da_filter
  import rrc_pkg::*;
(
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    clk_enable,
  input  logic signed [IN_W-1:0]  filter_in,
  output logic signed [OUT_W-1:0] filter_out,
  output logic                    ce_out
);

  logic                        en, first, last;
  sample_t                     taps [NTAPS-1];
  sample_t                     win  [NTAPS];
  presum_t                     sums [NUNIQ];
  logic [NUNIQ-1:0]            bits;
  logic signed [P_W-1:0]       p;
  logic signed [ACC_W-1:0]     result;

  da_controller #(.B(NBITS)) u_ctrl (
    .clk, .rst(reset), .clk_enable, .en, .first, .last, .bitn()
  );

  tap_delay_line #(.W(IN_W), .DEPTH(NTAPS-1)) u_delay (
    .clk, .rst(reset), .shift(en & last), .din(filter_in), .taps
  );

  always_comb begin
    win[0] = filter_in;
    for (int k = 1; k < NTAPS; k++) win[k] = taps[k-1];
  end

  sym_preadder #(.W(IN_W), .NTAPS(NTAPS)) u_fold (
    .win, .sums
  );

  da_piso #(.N(NUNIQ), .W(SUM_W)) u_piso (
    .clk, .rst(reset), .en, .load(last), .par_in(sums), .bits
  );

  da_lut_bank #(.NUNIQ(NUNIQ), .LUT_IN(LUT_IN), .LUT_W(LUT_W), .P_W(P_W)) u_lut (
    .bits, .p
  );

  shift_accumulator #(.P_W(P_W), .B(NBITS)) u_acc (
    .clk, .rst(reset), .en, .first, .last, .p, .result, .valid(ce_out)
  );

  assign filter_out = result[OUT_SHIFT +: OUT_W];

endmodule
