// tap_delay_line: the sample window of the FIR filter.
//
// A chain of DEPTH registers of W bits. On every clock with `shift` high the
// new sample `din` enters tap 0 and every older sample moves one tap on, so
// taps[k] holds x[n-1-k] once sample x[n] has been taken. Together with `din`
// (the sample being taken in this cycle) the taps form the NTAPS-sample window
// x[n] .. x[n-24] that the symmetric pre-adders read.
//
// Interface: clk, synchronous active-high rst (clears all taps to zero, the
// filter's initial state), shift (one-cycle strobe per sample), din, taps.
// Timing: taps change on the rising edge where shift is high.
// The published design only says the filter is a 25-tap FIR; the register chain (as
// opposed to a RAM or shift-register LUT primitive) is this design's choice.
module tap_delay_line #(
  parameter int W     = rrc_pkg::IN_W,
  parameter int DEPTH = rrc_pkg::NTAPS - 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                shift,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] taps [DEPTH]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < DEPTH; k++) taps[k] <= '0;
    end else if (shift) begin
      taps[0] <= din;
      for (int k = 1; k < DEPTH; k++) taps[k] <= taps[k-1];
    end
  end

endmodule
