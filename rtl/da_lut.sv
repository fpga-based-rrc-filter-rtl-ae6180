// da_lut: one partition of the distributed-arithmetic look-up table.
//
// The ROM holds, for every K-bit address a, the sum of the coefficients
// COEF[FIRST+i] whose address bit a[i] is set:
//   TABLE[a] = sum_{i=0}^{K-1} a[i] * COEF[FIRST+i]
// Fed with one bit of each of K input words, it returns the partial inner
// product for that bit position without any multiplier. The table is computed
// at elaboration from rrc_pkg::COEF.
//
// Interface: addr (K bits), value (signed LUT_W bits). Combinational read.
// The DA look-up table follows the published design; splitting the 13 inputs into
// partitions of LUT_IN = 4 address bits (matching a 4-input LUT fabric) is
// this design's choice.
module da_lut #(
  parameter int FIRST = 0,
  parameter int K     = rrc_pkg::LUT_IN,
  parameter int LUT_W = rrc_pkg::LUT_W
) (
  input  logic        [K-1:0]     addr,
  output logic signed [LUT_W-1:0] value
);

  typedef logic signed [LUT_W-1:0] entry_t;
  typedef entry_t table_t [2**K];

  function automatic table_t build_table();
    table_t t;
    for (int a = 0; a < 2**K; a++) begin
      t[a] = '0;
      for (int i = 0; i < K; i++)
        if (((a >> i) & 1) == 1)
          t[a] = t[a] + entry_t'(rrc_pkg::COEF[FIRST+i]);
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign value = TABLE[addr];

endmodule
