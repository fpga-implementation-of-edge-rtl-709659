// Visibility-degree module.
//
// Finds the largest and smallest of the 16 pixels of the sliding block, forms
// their difference D = max - min and compares it with a fixed visibility
// threshold: vd_pos = (D > VIS_TH), i.e. "VD is positive". The fixed
// threshold replaces the luminance-dependent threshold
// V(BL) = 20.66 exp(-0.03 BL) + exp(0.008 BL) of the original algorithm, as
// the hardware design prescribes; its value is not given, so the default 4
// is this design's choice (V(BL) lies between 3.2 and 4.3 for background
// luminance 70..150, the range where the eye is most sensitive).
// Purely combinational; max, min and D are also given to the structure
// degree module.
module vd_module
  import scaler_pkg::*;
#(
  parameter int VIS_TH = 4
) (
  input  blk4_t  blk,
  output pixel_t max_o,
  output pixel_t min_o,
  output pixel_t d_o,
  output logic   vd_pos
);

  always_comb begin
    max_o = blk[0][0];
    min_o = blk[0][0];
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 4; i++) begin
        if (blk[j][i] > max_o) max_o = blk[j][i];
        if (blk[j][i] < min_o) min_o = blk[j][i];
      end
    d_o    = max_o - min_o;
    vd_pos = (int'(d_o) > VIS_TH);
  end

endmodule
