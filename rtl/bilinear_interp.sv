// Bilinear interpolation module for 2x scaling.
//
// The three new pixels around the anchor O(1,1) of the sliding block are
// averages of their nearest original pixels, computed with shifts:
//   P(1,0)  = (O(1,1) + O(2,1)) >> 1                     (right of O(1,1))
//   P(0,-1) = (O(1,1) + O(1,2)) >> 1                     (below O(1,1))
//   P(1,-1) = (O(1,1) + O(2,1) + O(1,2) + O(2,2)) >> 2   (diagonal)
// exactly as described. Purely combinational.
module bilinear_interp
  import scaler_pkg::*;
(
  input  blk4_t blk,
  output trio_t p
);

  // blk[j][i] = O(i,j)
  always_comb begin
    p[0] = pixel_t'((9'(blk[1][1]) + 9'(blk[1][2])) >> 1);
    p[1] = pixel_t'((9'(blk[1][1]) + 9'(blk[2][1])) >> 1);
    p[2] = pixel_t'((10'(blk[1][1]) + 10'(blk[1][2]) + 10'(blk[2][1]) + 10'(blk[2][2])) >> 2);
  end

endmodule
