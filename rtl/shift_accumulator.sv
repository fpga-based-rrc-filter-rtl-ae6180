// shift_accumulator: the DA scaling accumulator.
//
// Sums the partial products p_n of the bit positions n = 0 .. B-1 of the
// pre-added sums, presented LSB first, into
//   y = sum_{n=0}^{B-2} p_n * 2^n  -  p_{B-1} * 2^{B-1}
// which is the inner product sum_k COEF[k] * sums[k] (two's-complement sign
// bit weighted negatively, equation (4) of the DA formulation). Each step
// shifts the accumulator right by one and adds p aligned at bit B-1, so no
// wide shifter is needed and no precision is lost: the accumulator is
// P_W + B bits wide.
//
// Interface: en (clock enable), first (bit 0: discard the old contents), last
// (sign bit: subtract, then copy the finished sum to `result`), p (partial
// product), result (registered inner product, in units of 2^-(IN_FRAC +
// COEF_FRAC)), valid (one-cycle pulse in the cycle after `result` is written).
// Synchronous active-high rst clears everything.
// The shift-accumulate with a subtracted sign term follows the published design; the
// right-shifting form and the widths are this design's choice.
module shift_accumulator #(
  parameter int P_W   = rrc_pkg::P_W,
  parameter int B     = rrc_pkg::NBITS,
  parameter int ACC_W = P_W + B
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    first,
  input  logic                    last,
  input  logic signed [P_W-1:0]   p,
  output logic signed [ACC_W-1:0] result,
  output logic                    valid
);

  logic signed [ACC_W-1:0] acc, acc_next, base, addend;

  always_comb begin
    addend = ACC_W'(p) <<< (B - 1);
    if (first) base = '0;
    else       base = acc >>> 1;
    if (last)  acc_next = base - addend;
    else       acc_next = base + addend;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc    <= '0;
      result <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (en) begin
        acc <= acc_next;
        if (last) begin
          result <= acc_next;
          valid  <= 1'b1;
        end
      end
    end
  end

endmodule
