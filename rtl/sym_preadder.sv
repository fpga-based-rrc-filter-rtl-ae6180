// sym_preadder: folds the symmetric filter window.
//
// The filter's coefficients satisfy h[k] = h[NTAPS-1-k], so the two samples
// that meet the same coefficient are added before the DA stage:
//   sums[k] = win[k] + win[NTAPS-1-k]          for k < NTAPS/2
//   sums[NUNIQ-1] = win[(NTAPS-1)/2]           centre tap, odd NTAPS only
// This halves the number of DA inputs (25 -> 13). Each sum is one bit wider
// than a sample, so no overflow is possible.
//
// Interface: win[] (x[n] at index 0), sums[] in the coefficient order of
// rrc_pkg::COEF. Purely combinational.
// Exploiting the symmetry follows the published design; adding full words in parallel
// (rather than with bit-serial adders) is this design's choice.
module sym_preadder #(
  parameter int W     = rrc_pkg::IN_W,
  parameter int NTAPS = rrc_pkg::NTAPS,
  parameter int NUNIQ = (NTAPS + 1) / 2
) (
  input  logic signed [W-1:0] win  [NTAPS],
  output logic signed [W:0]   sums [NUNIQ]
);

  always_comb begin
    for (int k = 0; k < NTAPS / 2; k++)
      sums[k] = (W+1)'(win[k]) + (W+1)'(win[NTAPS-1-k]);
    if (NTAPS % 2 == 1)
      sums[NUNIQ-1] = (W+1)'(win[(NTAPS-1)/2]);
  end

endmodule
