// Fuzzy decision module.
//
// Classifies the sliding block from three variables: visibility degree
// (VD, is the contrast visible), structure degree (SD, two even clusters or
// noise) and complexity degree (CD, edge or texture). Of the seven rules,
// only "VD is P and SD is S/M and CD is S" selects the edge-adaptive
// interpolator (AA); every other case selects bilinear (BL). With the binary
// hardware SD (small below 0.5, big from 0.5) and a crisp CD class this
// reduces to: mode = AA  iff  vd_pos && !sd_big && cd_small.
// The sub-modules and the rule set follow the described design.
//
// Interface: the 6x6 window (the 4x4 block is its centre); the variables are
// brought out for observation. Purely combinational.
module fuzzy_decision
  import scaler_pkg::*;
#(
  parameter int VIS_TH = 4,
  parameter int CD_TH  = 11
) (
  input  win6_t        win,
  output interp_mode_t mode,
  output logic         vd_pos,
  output logic         sd_big,
  output logic         cd_small,
  output logic [6:0]   cd,
  output pixel_t       mean
);

  blk4_t       blk;
  logic [11:0] sum;
  pixel_t      mx, mn;

  always_comb begin
    sum = '0;
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 4; i++) begin
        blk[j][i] = win[j+1][i+1];
        sum       = sum + 12'(win[j+1][i+1]);
      end
    mean = sum[11:4];
  end

  vd_module #(.VIS_TH(VIS_TH)) u_vd (
    .blk(blk), .max_o(mx), .min_o(mn), .d_o(), .vd_pos(vd_pos)
  );

  sd_module u_sd (
    .max_i(mx), .min_i(mn), .mean_i(mean), .numer_o(), .sd_big(sd_big)
  );

  cd_module #(.CD_TH(CD_TH)) u_cd (
    .win(win), .mean_i(mean), .cd_o(cd), .cd_small(cd_small)
  );

  assign mode = (vd_pos && !sd_big && cd_small) ? MODE_AA : MODE_BL;

endmodule
