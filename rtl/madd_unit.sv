// madd_unit: the node's 32 x 32-bit fixed-point multiply-add, y = a + b*c.
//
// The multiply-add is the one arithmetic primitive of the machine.  Words
// are signed fixed point with 31 fraction bits (values from -1 up to
// 1 - 2^-31).  The 64-bit product is shifted right by 31 (rounding toward
// minus infinity), added to a and saturated to the 32-bit range.  The
// document gives the operation and the 32-bit width; the number format,
// rounding and saturation are this design's choices.
//
// The unit is combinational; the arithmetic/register unit registers its
// result, giving one multiply-add per clock.
module madd_unit #(
  parameter int unsigned W    = 32,
  parameter int unsigned FRAC = W - 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         sat      // the result was clipped
);

  logic signed [2*W-1:0] prod;
  logic signed [W+1:0]   sum;
  logic signed [W+1:0]   max_v, min_v;

  always_comb begin
    prod  = $signed(b) * $signed(c);
    sum   = (W+2)'(prod >>> FRAC) + (W+2)'($signed(a));
    max_v = (W+2)'({1'b0, {(W-1){1'b1}}});
    min_v = -max_v - (W+2)'(1);
    sat   = 1'b0;
    if (sum > max_v) begin
      y   = {1'b0, {(W-1){1'b1}}};
      sat = 1'b1;
    end else if (sum < min_v) begin
      y   = {1'b1, {(W-1){1'b0}}};
      sat = 1'b1;
    end else begin
      y   = sum[W-1:0];
    end
  end

endmodule
