// Square-wave digital mixer of the lock-in.
// Multiplies the sample by a +/-1 square wave: the sample passes unchanged
// while the reference bit (the MSB of a DDS output) is 0 and is negated while
// it is 1.  No multiplier is needed.  The one value whose negation does not
// fit (the most negative) is saturated to the most positive value, which is
// this design's choice.  Purely combinational.
module sq_mixer #(
  parameter int unsigned W = 17
) (
  input  logic signed [W-1:0] in_data,
  input  logic                ref_bit,
  output logic signed [W-1:0] out_data
);
  localparam logic signed [W-1:0] MIN_V = {1'b1, {(W-1){1'b0}}};
  localparam logic signed [W-1:0] MAX_V = {1'b0, {(W-1){1'b1}}};
  always_comb begin
    if (!ref_bit)                out_data = in_data;
    else if (in_data == MIN_V)   out_data = MAX_V;
    else                         out_data = -in_data;
  end
endmodule
