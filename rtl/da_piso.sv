// da_piso: parallel-in, serial-out registers for bit-serial distributed
// arithmetic.
//
// N registers of W bits. With `load` the pre-added sums are captured; on every
// other enabled clock all registers shift right by one, so `bits` presents bit
// 0 of every sum in the first cycle after the load, bit 1 in the next, and bit
// W-1 (the two's-complement sign bit) in the W-th cycle. bits[k] is the DA
// address bit belonging to coefficient k.
//
// Interface: clk, synchronous active-high rst (clears to zero), en (clock
// enable), load (takes priority over shifting), par_in[], bits.
// The LSB-first bit-serial order follows the DA formulation in the published design;
// the register structure is this design's choice.
module da_piso #(
  parameter int N = rrc_pkg::NUNIQ,
  parameter int W = rrc_pkg::SUM_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic                load,
  input  logic signed [W-1:0] par_in [N],
  output logic        [N-1:0] bits
);

  logic [W-1:0] sreg [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N; k++) sreg[k] <= '0;
    end else if (en) begin
      for (int k = 0; k < N; k++)
        sreg[k] <= load ? par_in[k] : {1'b0, sreg[k][W-1:1]};
    end
  end

  always_comb
    for (int k = 0; k < N; k++) bits[k] = sreg[k][0];

endmodule
