// Image interpolation circuit: 36 original pixels in, three new pixels out.
//
// The 6x6 window is examined by three modules working side by side. The
// fuzzy decision module decides whether the 4x4 sliding block at its centre
// is worth edge-adaptive treatment; the angle evaluation module finds the
// dominant edge orientation from 16 Sobel gradients and CORDICs; the image
// interpolation stage then outputs either the bilinear pixels or the
// edge-adaptive weighted sums with the weights of the dominant sector.
// Edge-adaptive output is used only when the fuzzy rules say AA and the
// angle evaluation found a usable dominant angle; a block without any
// usable gradient falls back to bilinear (this design's choice).
//
// The datapath is combinational, as in the described design (its image
// scaling unit holds no pipeline registers and needs about 70 ns); the
// data-flow controller holds the window stable for a fixed number of clocks
// and then samples p. The only state is the weight table, written through
// the wt_* port.
//
// Output order: p[0] = P(1,0) right of O(1,1), p[1] = P(0,-1) below it,
// p[2] = P(1,-1) diagonal.
module interp_circuit
  import scaler_pkg::*;
#(
  parameter int VIS_TH  = 4,
  parameter int CD_TH   = 11,
  parameter int VOTE_TH = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  win6_t        win,
  input  logic         wt_we,
  input  logic [8:0]   wt_waddr,
  input  weight_t      wt_wdata,
  output trio_t        p,
  output interp_mode_t mode,        // interpolator actually used
  output interp_mode_t fuzzy_mode,  // decision of the fuzzy module
  output logic [2:0]   sector,
  output logic         angle_ok
);

  blk4_t       blk;
  trio_t       p_bl, p_ea;
  weight_t     w [NPOS][16];

  always_comb
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 4; i++)
        blk[j][i] = win[j+1][i+1];

  fuzzy_decision #(.VIS_TH(VIS_TH), .CD_TH(CD_TH)) u_fuzzy (
    .win(win), .mode(fuzzy_mode), .vd_pos(), .sd_big(), .cd_small(), .cd(), .mean()
  );

  angle_eval #(.VOTE_TH(VOTE_TH)) u_angle (
    .win(win), .dom(sector), .dom_count(), .dom_ok(angle_ok), .sect(), .avalid()
  );

  weight_table u_wtab (
    .clk(clk), .rst_n(rst_n), .we(wt_we), .waddr(wt_waddr), .wdata(wt_wdata),
    .sector(sector), .w(w)
  );

  bilinear_interp u_bl (.blk(blk), .p(p_bl));

  edge_adaptive_interp u_ea (.blk(blk), .w(w), .p(p_ea));

  assign mode = (fuzzy_mode == MODE_AA && angle_ok) ? MODE_AA : MODE_BL;
  assign p    = (mode == MODE_AA) ? p_ea : p_bl;

endmodule
