// Complexity-degree module.
//
// Binarises the pixels with an adaptive threshold, the mean of the 4x4
// sliding block (a pixel that reaches the mean becomes 1), then sums the
// four-direction local gradient |4 O'(i,j) - (O'(i+1,j) + O'(i-1,j) +
// O'(i,j+1) + O'(i,j-1))| over the 16 block pixels. A large sum means
// texture, a small one a clean edge. cd_small is set when the sum is at most
// CD_TH, the "CD is small" class of the fuzzy rules.
//
// The neighbours of the block's border pixels lie in the outer ring of the
// 6x6 window and are binarised with the same mean: this design's reading of
// how the border terms of the sum are formed. The default CD_TH = 11 is this
// design's crisp cut between the fuzzy sets S (falls from 10 to 13) and M
// (rises from 10 to 13), where their memberships cross at 11.5.
// Purely combinational.
module cd_module
  import scaler_pkg::*;
#(
  parameter int CD_TH = 11
) (
  input  win6_t      win,
  input  pixel_t     mean_i,
  output logic [6:0] cd_o,
  output logic       cd_small
);

  logic [5:0][5:0] b;
  logic [2:0]      nsum;
  logic [2:0]      g;

  always_comb begin
    for (int r = 0; r < 6; r++)
      for (int c = 0; c < 6; c++)
        b[r][c] = (win[r][c] >= mean_i);
    cd_o = '0;
    for (int r = 1; r < 5; r++)
      for (int c = 1; c < 5; c++) begin
        nsum = 3'(b[r-1][c]) + 3'(b[r+1][c]) + 3'(b[r][c-1]) + 3'(b[r][c+1]);
        g    = b[r][c] ? 3'(3'd4 - nsum) : nsum;
        cd_o = cd_o + 7'(g);
      end
    cd_small = (int'(cd_o) <= CD_TH);
  end

endmodule
