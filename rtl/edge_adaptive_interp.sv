// Edge-adaptive interpolation module.
//
// Each new pixel is a weighted sum over the whole 4x4 sliding block,
//   P(m,n) = sum_{i,j} O(i,j) * W(theta,m,n)(i,j),
// with the 16 weights chosen by the dominant orientation theta and the
// position (m,n) of the new pixel. 48 multipliers work in parallel, as in
// the described design. Weights have 8 fractional bits (1/256 precision,
// the precision the design settled on); the sum is shifted right by 8
// (truncated) and clipped to 0..255. Truncation and clipping are this
// design's choice; with truncation, bilinear-kernel weights reproduce the
// bilinear module bit for bit. Purely combinational.
module edge_adaptive_interp
  import scaler_pkg::*;
(
  input  blk4_t   blk,
  input  weight_t w [NPOS][16],
  output trio_t   p
);

  localparam int ACC_W = 8 + WEIGHT_W + 5;

  logic signed [ACC_W-1:0] acc [NPOS];

  always_comb begin
    for (int k = 0; k < NPOS; k++) begin
      acc[k] = '0;
      for (int t = 0; t < 16; t++)
        acc[k] = acc[k] + ACC_W'($signed({1'b0, blk[t/4][t%4]}) * w[k][t]);
      acc[k] = acc[k] >>> WEIGHT_FRAC;
      if (acc[k] < 0)        p[k] = 8'd0;
      else if (acc[k] > 255) p[k] = 8'd255;
      else                   p[k] = pixel_t'(acc[k]);
    end
  end

endmodule
