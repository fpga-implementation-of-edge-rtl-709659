// Structure-degree module.
//
// The structure degree SD = |(max - mean) - (mean - min)| / (max - min) tells
// whether the block splits into two even clusters (small SD: edge or
// texture) or not (large SD: noise). The hardware avoids the division: it
// only decides whether SD reaches 0.5 by comparing the numerator with the
// denominator shifted right by one bit (bits [7:1] of max - min).
// sd_big = 0 when (max - min) >> 1 is larger than the numerator, else 1.
// The mean is the 16-pixel sum shifted right by four (truncated), an 8-bit
// integer as in the described design. The numerator is compared with all
// its bits (the description names bits [6:0]; a numerator of 128 or more is
// always at least half of an 8-bit denominator, so the result is the same
// whenever the numerator fits in seven bits and correct when it does not).
// Purely combinational.
module sd_module
  import scaler_pkg::*;
(
  input  pixel_t max_i,
  input  pixel_t min_i,
  input  pixel_t mean_i,
  output pixel_t numer_o,
  output logic   sd_big
);

  logic signed [9:0] diff;
  pixel_t            denom;

  always_comb begin
    diff    = $signed({2'b00, max_i}) + $signed({2'b00, min_i}) - $signed({1'b0, mean_i, 1'b0});
    numer_o = pixel_t'(diff < 0 ? -diff : diff);
    denom   = max_i - min_i;
    sd_big  = !({1'b0, denom[7:1]} > numer_o);
  end

endmodule
