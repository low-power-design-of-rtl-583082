// edge_magnitude: edge strength from the two Sobel gradients.
//
// out = min(|gx| + |gy|, 2^OUT_W - 1). The L1 norm replaces the Euclidean
// norm sqrt(gx^2 + gy^2), which is the usual hardware choice; saturation at
// the pixel range keeps the output a grey pixel. Both are this design's
// choices. Purely combinational.
module edge_magnitude #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 8
) (
  input  logic signed [IN_W-1:0] gx,
  input  logic signed [IN_W-1:0] gy,
  output logic        [OUT_W-1:0] mag,
  output logic                    saturated
);

  logic [IN_W:0]   abs_x, abs_y;   // one bit wider: |-2^(IN_W-1)| fits
  logic [IN_W+1:0] sum;

  assign abs_x = gx[IN_W-1] ? (IN_W+1)'(-{gx[IN_W-1], gx}) : (IN_W+1)'(gx);
  assign abs_y = gy[IN_W-1] ? (IN_W+1)'(-{gy[IN_W-1], gy}) : (IN_W+1)'(gy);
  assign sum   = (IN_W+2)'(abs_x) + (IN_W+2)'(abs_y);

  assign saturated = (sum > (IN_W+2)'({OUT_W{1'b1}}));
  assign mag       = saturated ? {OUT_W{1'b1}} : sum[OUT_W-1:0];

endmodule
