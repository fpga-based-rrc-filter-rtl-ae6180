// da_lut_bank: the complete DA look-up stage.
//
// The NUNIQ address bits (one bit of each pre-added sum) are split into
// partitions of at most LUT_IN bits; each partition has its own da_lut ROM of
// 2^LUT_IN words and the partition outputs are added. The result is
//   p = sum_k bits[k] * COEF[k],
// the partial product of one bit weight in equation (4) of the DA
// formulation. For the default 13 inputs the partitions are 4+4+4+1 bits.
//
// Interface: bits (NUNIQ), p (signed P_W). Combinational.
// Partitioning and the adder tree are this design's choice; the published design gives
// only the look-up-table principle.
module da_lut_bank #(
  parameter int NUNIQ  = rrc_pkg::NUNIQ,
  parameter int LUT_IN = rrc_pkg::LUT_IN,
  parameter int LUT_W  = rrc_pkg::LUT_W,
  parameter int P_W    = rrc_pkg::P_W
) (
  input  logic        [NUNIQ-1:0] bits,
  output logic signed [P_W-1:0]   p
);

  localparam int NPART = (NUNIQ + LUT_IN - 1) / LUT_IN;

  logic signed [LUT_W-1:0] part [NPART];

  for (genvar g = 0; g < NPART; g++) begin : g_part
    localparam int F  = g * LUT_IN;
    localparam int KP = (NUNIQ - F < LUT_IN) ? NUNIQ - F : LUT_IN;
    da_lut #(.FIRST(F), .K(KP), .LUT_W(LUT_W)) u_lut (
      .addr (bits[F +: KP]),
      .value(part[g])
    );
  end

  always_comb begin
    p = '0;
    for (int g = 0; g < NPART; g++) p = p + P_W'(part[g]);
  end

endmodule
