// da_controller: sequencer of the bit-serial DA filter.
//
// A bit counter runs 0 .. B-1 on every enabled clock, so one sample is
// processed every B clocks. It flags the cycle of bit 0 (`first`) and of the
// sign bit (`last`). The `last` cycle is also the sample cycle: on its clock
// edge the delay line takes the new input, the serial registers load the new
// pre-added sums and the accumulator completes the previous inner product.
// After reset the counter sits at B-1, so the first enabled clock already
// takes a sample.
//
// Interface: clk, synchronous active-high rst, clk_enable (stalls the whole
// sequence while low), en (= clk_enable, the datapath's enable), first, last,
// bitn (current bit index).
// Timing: `first`/`last` are decoded from the counter register (no extra
// delay). The counter is this design's choice; the published design gives no control
// logic.
module da_controller #(
  parameter int B = rrc_pkg::NBITS
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clk_enable,
  output logic                 en,
  output logic                 first,
  output logic                 last,
  output logic [$clog2(B)-1:0] bitn
);

  always_ff @(posedge clk) begin
    if (rst)
      bitn <= ($clog2(B))'(B - 1);
    else if (clk_enable)
      bitn <= (bitn == ($clog2(B))'(B - 1)) ? '0 : bitn + 1'b1;
  end

  assign en    = clk_enable;
  assign first = (bitn == '0);
  assign last  = (bitn == ($clog2(B))'(B - 1));

endmodule
