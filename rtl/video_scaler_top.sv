// Real-time edge-adaptive 2x video scaler: top level.
//
// An ITU-R.656 byte stream from a video decoder enters on clk_video. The
// decoder and the capture address generator cut an IN_W x IN_H luminance
// window, placed by start_x/start_y, out of one interlaced frame (odd and
// even field) and write it into the input frame buffer. When a frame is
// complete the data-flow controller, on clk_sys, slides a 6x6 window over
// it, lets the interpolation circuit produce three new pixels per position
// (bilinear or edge-adaptive, chosen by the fuzzy decision module) and
// writes originals and new pixels into the (2*IN_W-1) x (2*IN_H-1) output
// frame buffer. The LCD timing generator, on clk_lcd, reads that buffer
// and drives the panel's sync and data lines. As in the original, reading
// starts once the first image has been interpolated: until then the
// generator is held in reset (syncs and data idle); from then on it runs
// continuously and shows the latest image.
//
// Capture and processing alternate: a new frame is captured only while the
// controller is idle, so the input buffer never changes under it. The
// handshake between the clock domains (frame-complete pulse to clk_sys, busy
// level to clk_video) is this design's own. The weight table of the
// edge-adaptive interpolator is loaded through wt_* on clk_sys.
//
// Observation outputs on clk_sys: blk_done pulses when a block's three
// pixels are written; blk_mode and blk_sector tell which interpolator the
// block used and its dominant orientation sector.
module video_scaler_top
  import scaler_pkg::*;
#(
  parameter int IN_W           = 161,
  parameter int IN_H           = 121,
  parameter int BLOCK_COLS     = 156,
  parameter int BLOCK_ROWS     = 115,
  parameter int COMPUTE_CYCLES = 7,
  parameter int VIS_TH         = 4,
  parameter int CD_TH          = 11,
  parameter int VOTE_TH        = 0,
  parameter int H_TOTAL        = 1171,
  parameter int H_BLANK        = 152,
  parameter int H_VALID        = 960,
  parameter int V_TOTAL        = 262,
  parameter int V_BLANK        = 14,
  parameter int V_VALID        = 240
) (
  input  logic         clk_video,
  input  logic         clk_sys,
  input  logic         clk_lcd,
  input  logic         rst_n,
  // ITU-R.656 input
  input  logic [7:0]   itu_data,
  // capture window position (user buttons)
  input  logic [10:0]  start_x,
  input  logic [9:0]   start_y,
  // weight table load port (clk_sys)
  input  logic         wt_we,
  input  logic [8:0]   wt_waddr,
  input  weight_t      wt_wdata,
  // LCD panel
  output logic         lcd_hd,
  output logic         lcd_vd,
  output logic         lcd_den,
  output pixel_t       lcd_din,
  // status
  output logic         capturing,     // clk_video
  output logic         busy,          // clk_sys
  output logic         frame_done,    // clk_sys pulse
  output logic         blk_done,      // clk_sys pulse
  output interp_mode_t blk_mode,
  output logic [2:0]   blk_sector
);

  localparam int OUT_W      = 2 * IN_W - 1;
  localparam int OUT_H      = 2 * IN_H - 1;
  localparam int IN_ADDR_W  = $clog2(IN_W * IN_H);
  localparam int OUT_ADDR_W = $clog2(OUT_W * OUT_H);

  // ---------------- video clock domain: decode and capture ----------------
  logic [31:0]  itu_window;
  logic         itu_trs, itu_vld;
  logic [2:0]   itu_fvh;
  itu_state_t   itu_state;
  logic         cap_we, cap_done, busy_v;
  logic [IN_ADDR_W-1:0] cap_addr;
  pixel_t       cap_data;

  itu656_decoder u_dec (
    .clk(clk_video), .rst_n(rst_n), .din_en(1'b1), .din(itu_data),
    .window(itu_window), .trs(itu_trs), .fvh(itu_fvh), .newest_vld(itu_vld),
    .state(itu_state)
  );

  level_sync u_busy_sync (.clk(clk_video), .rst_n(rst_n), .d(busy), .q(busy_v));

  capture_addr_gen #(.IN_W(IN_W), .IN_H(IN_H)) u_cap (
    .clk(clk_video), .rst_n(rst_n), .newest(itu_window[7:0]), .newest_vld(itu_vld),
    .trs(itu_trs), .fvh(itu_fvh), .state(itu_state), .start_x(start_x),
    .start_y(start_y), .arm(!busy_v), .wr_en(cap_we), .wr_addr(cap_addr),
    .wr_data(cap_data), .capturing(capturing), .frame_done(cap_done),
    .count_h(), .count_v()
  );

  // ---------------- frame buffers ----------------
  logic [IN_ADDR_W-1:0]  in_raddr;
  pixel_t                in_rdata;
  logic                  out_we;
  logic [OUT_ADDR_W-1:0] out_waddr, out_raddr;
  pixel_t                out_wdata, out_rdata;

  frame_buffer #(.DEPTH(IN_W * IN_H), .DATA_W(8)) u_in_buf (
    .wclk(clk_video), .we(cap_we), .waddr(cap_addr), .wdata(cap_data),
    .rclk(clk_sys), .raddr(in_raddr), .rdata(in_rdata)
  );

  frame_buffer #(.DEPTH(OUT_W * OUT_H), .DATA_W(8)) u_out_buf (
    .wclk(clk_sys), .we(out_we), .waddr(out_waddr), .wdata(out_wdata),
    .rclk(clk_lcd), .raddr(out_raddr), .rdata(out_rdata)
  );

  // ---------------- system clock domain: scaling ----------------
  logic         start_s;
  win6_t        win;
  trio_t        p;
  df_state_t    df_state;
  interp_mode_t mode;
  logic [2:0]   sector;

  pulse_sync u_start_sync (
    .src_clk(clk_video), .src_rst_n(rst_n), .src_pulse(cap_done),
    .dst_clk(clk_sys), .dst_rst_n(rst_n), .dst_pulse(start_s)
  );

  dataflow_ctrl #(
    .IN_W(IN_W), .IN_H(IN_H), .BLOCK_COLS(BLOCK_COLS), .BLOCK_ROWS(BLOCK_ROWS),
    .COMPUTE_CYCLES(COMPUTE_CYCLES)
  ) u_df (
    .clk(clk_sys), .rst_n(rst_n), .start(start_s),
    .rd_addr(in_raddr), .rd_data(in_rdata), .win(win), .p(p),
    .out_we(out_we), .out_addr(out_waddr), .out_data(out_wdata),
    .state(df_state), .busy(busy), .blk_done(blk_done), .done(frame_done)
  );

  interp_circuit #(.VIS_TH(VIS_TH), .CD_TH(CD_TH), .VOTE_TH(VOTE_TH)) u_interp (
    .clk(clk_sys), .rst_n(rst_n), .win(win),
    .wt_we(wt_we), .wt_waddr(wt_waddr), .wt_wdata(wt_wdata),
    .p(p), .mode(mode), .fuzzy_mode(), .sector(sector), .angle_ok()
  );

  // the block's decision, held with its results
  always_ff @(posedge clk_sys or negedge rst_n) begin
    if (!rst_n) begin
      blk_mode   <= MODE_BL;
      blk_sector <= '0;
    end else if (df_state == DF_COMPUTE) begin
      blk_mode   <= mode;
      blk_sector <= sector;
    end
  end

  // ---------------- LCD clock domain: display ----------------
  // First image finished: a sticky flag on clk_sys, carried to clk_lcd. It
  // leaves reset synchronously to clk_lcd (it is a clk_lcd flip-flop).
  logic shown_s, shown_l;
  always_ff @(posedge clk_sys or negedge rst_n) begin
    if (!rst_n)          shown_s <= 1'b0;
    else if (frame_done) shown_s <= 1'b1;
  end

  level_sync u_show_sync (.clk(clk_lcd), .rst_n(rst_n), .d(shown_s), .q(shown_l));

  wire lcd_rst_n = rst_n && shown_l;

  lcd_timing_gen #(
    .H_TOTAL(H_TOTAL), .H_BLANK(H_BLANK), .H_VALID(H_VALID),
    .V_TOTAL(V_TOTAL), .V_BLANK(V_BLANK), .V_VALID(V_VALID),
    .OUT_W(OUT_W), .OUT_H(OUT_H)
  ) u_lcd (
    .clk(clk_lcd), .rst_n(lcd_rst_n), .rd_addr(out_raddr), .rd_data(out_rdata),
    .hd(lcd_hd), .vd(lcd_vd), .den(lcd_den), .din(lcd_din),
    .frame_start()
  );

endmodule
