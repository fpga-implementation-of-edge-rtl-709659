// Main angle decision module.
//
// Takes the orientation sectors of the 16 pixels of the sliding block
// (0..7, sector k stands for 22.5*k degrees) and picks the one that occurs
// most often. Pixels whose gradient is zero in both directions carry no
// orientation and are left out of the count. `dom_ok` is high when the
// winning sector was seen more than VOTE_TH times; with the default 0 this
// only requires one usable angle. The described design checks that the most
// frequent angle occurs more than "a certain number" of times without
// giving the number, so VOTE_TH is a parameter. Ties go to the lowest sector
// number (this design's choice). Purely combinational.
module main_angle_decision
  import scaler_pkg::*;
#(
  parameter int VOTE_TH = 0
) (
  input  logic [2:0]  sect  [16],
  input  logic        valid [16],
  output logic [2:0]  dom,
  output logic [4:0]  dom_count,
  output logic        dom_ok
);

  logic [4:0] hist [NSECT];

  always_comb begin
    for (int k = 0; k < NSECT; k++) hist[k] = '0;
    for (int n = 0; n < 16; n++)
      if (valid[n]) hist[sect[n]] = hist[sect[n]] + 5'd1;
    dom       = '0;
    dom_count = hist[0];
    for (int k = 1; k < NSECT; k++)
      if (hist[k] > dom_count) begin
        dom       = 3'(k);
        dom_count = hist[k];
      end
    dom_ok = (int'(dom_count) > VOTE_TH);
  end

endmodule
