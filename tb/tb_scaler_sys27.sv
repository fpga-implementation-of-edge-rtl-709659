// End-to-end test of the video scaler with the system clock lowered to
// 27 MHz. The interpolation circuit's combinational delay (about 70 ns) then
// needs only COMPUTE_CYCLES = 2 clocks, so one frame takes
// 1 + 115 x 37 + 17825 x 7 + 17940 x (2 + 3 + 1) = 236671 clocks (8.77 ms,
// about 114 frames/s). Everything else is the default configuration.
//
// The stimulus, reference model and checks are those of the default-size
// end-to-end test: a full NTSC ITU-R.656 frame with flat, ramp, edge and
// texture regions, sector-dependent weights, per-block mode and sector
// checks, the processing-time check and a pixel compare of one LCD field.
//
// Mechanisms that must each happen at least once: odd field, even field,
// capture complete, LOAD_MEM_36, LOAD_MEM_6, bilinear block, edge-adaptive
// block, a discarded (zero) gradient, weight-table write, an LCD field, a
// frame skipped because it arrived while the scaler was busy (a second,
// inverted frame follows the first at once; it must not reach the buffer),
// and the display held idle until the first image is finished (no sync pulse
// and no data on the panel lines before that).
module tb_scaler_sys27;
  timeunit 1ns;
  timeprecision 1ps;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;

  localparam int IN_W = 161, IN_H = 121, OUT_W = 2 * IN_W - 1, OUT_H = 2 * IN_H - 1;
  localparam int BC = 156, BR = 115, CC = 2;     // block sweep, compute clocks
  localparam int SX = 200, SY = 8;               // capture window position
  localparam real SYS_NS = 37.037;               // system clock period

  int checks = 0, failures = 0;
  logic         clk_video = 0, clk_sys = 0, clk_lcd = 0, rst_n = 0;
  logic [7:0]   itu_data = 8'h10;
  logic         wt_we = 0;
  logic [8:0]   wt_waddr = '0;
  weight_t      wt_wdata = '0;
  logic         lcd_hd, lcd_vd, lcd_den, capturing, busy, frame_done, blk_done;
  pixel_t       lcd_din;
  interp_mode_t blk_mode;
  logic [2:0]   blk_sector;

  video_scaler_top #(.COMPUTE_CYCLES(CC)) dut (
    .clk_video(clk_video), .clk_sys(clk_sys), .clk_lcd(clk_lcd), .rst_n(rst_n),
    .itu_data(itu_data), .start_x(11'(SX)), .start_y(10'(SY)),
    .wt_we(wt_we), .wt_waddr(wt_waddr), .wt_wdata(wt_wdata),
    .lcd_hd(lcd_hd), .lcd_vd(lcd_vd), .lcd_den(lcd_den), .lcd_din(lcd_din),
    .capturing(capturing), .busy(busy), .frame_done(frame_done),
    .blk_done(blk_done), .blk_mode(blk_mode), .blk_sector(blk_sector));

  always #18.519 clk_video = !clk_video;   // 27 MHz
  always #(SYS_NS / 2.0) clk_sys = !clk_sys;
  always #27.145 clk_lcd   = !clk_lcd;     // 18.42 MHz

  initial begin
    #150ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- picture, in capture-window coordinates ----------------
  bit inv = 0;  // the second frame is sent inverted
  function automatic int img(int c, int r);
    if (c < 40)       return 100 + ((c + r) % 3);
    else if (c < 50)  return 120;
    else if (c < 110) begin
      // edges of several orientations, one per band of 30 rows
      case (r / 30)
        0:       return (c > 80) ? 200 : 40;                        // vertical
        1:       return (2 * (c - 50) - (r - 30) > 30) ? 200 : 40;  // steep diagonal
        2:       return (r > 75) ? 190 : 50;                        // horizontal
        default: return ((c - 50) + (r - 90) > 40) ? 210 : 30;      // anti-diagonal
      endcase
    end
    else              return ((c / 2 + r / 2) % 2 == 1) ? 180 : 60;
  endfunction

  // ---------------- ITU-R.656 frame generator ----------------
  function automatic logic [7:0] xy(input logic [2:0] c);
    return {1'b1, c, c[1] ^ c[0], c[2] ^ c[0], c[2] ^ c[1], c[2] ^ c[1] ^ c[0]};
  endfunction

  task automatic put(input logic [7:0] b);
    @(negedge clk_video);
    itu_data = b;
  endtask

  // f, v: field and vertical-blank bits; l: active line number in the field
  task automatic itu_line(input logic f, input logic v, input int l);
    int c, r, y;
    put(8'hFF); put(8'h00); put(8'h00); put(xy({f, v, 1'b1}));
    for (int k = 0; k < 268; k++) put(k[0] ? 8'h10 : 8'h80);
    put(8'hFF); put(8'h00); put(8'h00); put(xy({f, v, 1'b0}));
    for (int s = 0; s < 720; s++) begin
      put(8'h80);
      c = s - SX;
      r = 2 * (l - SY) + int'(f);
      y = v ? 16 : ((c >= 0 && c < IN_W && r >= 0 && r < IN_H) ? img(c, r) : 16 + (s % 200));
      if (inv) y = 255 - y;
      put(8'(y));
    end
  endtask

  task automatic ntsc_frame();
    for (int n = 1; n <= 525; n++) begin
      if (n <= 3)        itu_line(1'b1, 1'b1, 0);
      else if (n <= 19)  itu_line(1'b0, 1'b1, 0);
      else if (n <= 263) itu_line(1'b0, 1'b0, n - 20);
      else if (n <= 265) itu_line(1'b0, 1'b1, 0);
      else if (n <= 282) itu_line(1'b1, 1'b1, 0);
      else               itu_line(1'b1, 1'b0, n - 283);
    end
  endtask

  // ---------------- reference model of the scaled picture ----------------
  int exp_img [OUT_H][OUT_W];
  int wt [8][3][16];

  function automatic win6_t window_at(int bx, int by);
    win6_t w;
    for (int r = 0; r < 6; r++)
      for (int c = 0; c < 6; c++) w[r][c] = pixel_t'(img(bx + c, by + r));
    return w;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_odd = 0, n_even = 0, n_cap = 0, n_l36 = 0, n_l6 = 0, n_bl = 0, n_aa = 0;
  int n_zero = 0, n_wt = 0, n_lcd = 0, nblk = 0, busy_cycles = 0, n_amb = 0, n_skip = 0;
  int sect_used [8] = '{default: 0};
  int n_hold = 0, n_early = 0;
  itu_state_t ps = ITU_BLANK;
  df_state_t  pd = DF_WAIT_FOR_START;

  always @(posedge clk_video) if (rst_n) begin
    if (dut.itu_state == ITU_ODD && ps != ITU_ODD) begin
      n_odd++;
      if (!capturing) n_skip++;   // a field that starts while the scaler is busy
    end
    if (dut.itu_state == ITU_EVEN && ps != ITU_EVEN) n_even++;
    ps = dut.itu_state;
  end

  // the panel lines must stay idle until the first image is finished
  always @(posedge clk_lcd) if (rst_n && n_cap == 0) begin
    n_hold++;
    if (!lcd_hd || !lcd_vd || lcd_den) n_early++;
  end

  always @(posedge clk_sys) if (rst_n) begin
    if (wt_we) n_wt++;
    if (busy) busy_cycles++;
    if (frame_done) n_cap++;
    if (dut.df_state == DF_LOAD_MEM_36 && pd != DF_LOAD_MEM_36) n_l36++;
    if (dut.df_state == DF_LOAD_MEM_6 && pd != DF_LOAD_MEM_6) n_l6++;
    pd = dut.df_state;
  end

  // one block finished: check its decision, record its expected pixels
  always @(posedge clk_sys) begin
    if (rst_n && blk_done && nblk >= BC * BR) begin
      failures++;   // more blocks than one frame holds
      nblk++;
    end else if (rst_n && blk_done) begin
      win6_t w;
      bit    aa, vd, sb, anyg;
      int    cdr, dx, dy, ks, h[8], best, bestc, amb, bx, by, ax, ay, use_sect, e[3];
      int    wv[16];
      real   margin;
      bx = nblk % BC;
      by = nblk / BC;
      nblk++;
      w  = window_at(bx, by);
      aa = fuzzy_aa(w, 4, 11, vd, sb, cdr);
      anyg = 0; amb = 0;
      for (int q = 0; q < 8; q++) h[q] = 0;
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < 4; i++) begin
          sobel(w, i, j, dx, dy);
          if (dx == 0 && dy == 0) n_zero++;
          else begin
            anyg = 1;
            ks = ref_sector(dx, dy, margin);
            h[ks]++;
            if (margin < 4.0) amb++;
          end
        end
      best = 0; bestc = h[0];
      for (int q = 1; q < 8; q++) if (h[q] > bestc) begin best = q; bestc = h[q]; end
      checks++;
      if ((blk_mode == MODE_AA) != (aa && anyg)) begin
        failures++;
        if (failures < 3) begin
          $display("block %0d,%0d: mode %0d vd %0d sb %0d cd %0d", bx, by, blk_mode, vd, sb, cdr);
          for (int r = 0; r < 6; r++) $display("  dut %p ref %p", dut.win[r], w[r]);
        end
      end
      if (aa && anyg) begin
        n_aa++;
        use_sect = best;
        sect_used[blk_sector]++;
        if (amb == 0) begin
          checks++;
          if (int'(blk_sector) != best) failures++;
        end else begin
          n_amb++;
          use_sect = int'(blk_sector);
        end
        for (int q = 0; q < 3; q++) begin
          for (int t = 0; t < 16; t++) wv[t] = wt[use_sect][q][t];
          e[q] = weighted(w, wv);
        end
      end else begin
        n_bl++;
        for (int q = 0; q < 3; q++) e[q] = bilinear(w, q);
      end
      ax = bx + 2;
      ay = by + 2;
      exp_img[2 * ay][2 * ax + 1]     = e[0];
      exp_img[2 * ay + 1][2 * ax]     = e[1];
      exp_img[2 * ay + 1][2 * ax + 1] = e[2];
    end
  end

  // ---------------- stimulus and final comparison ----------------
  initial begin
    int nd, row, col, t0;
    for (int y = 0; y < OUT_H; y++) for (int x = 0; x < OUT_W; x++) exp_img[y][x] = 0;
    for (int y = 0; y < BR + 5; y++)
      for (int x = 0; x < BC + 5; x++) exp_img[2 * y][2 * x] = img(x, y);
    for (int k = 0; k < 8; k++)
      for (int q = 0; q < 3; q++)
        for (int t = 0; t < 16; t++) begin
          wt[k][q][t] = 0;
          if (t == 5)  wt[k][q][t] = 100 + 10 * k;
          if (t == 6)  wt[k][q][t] = 60 - 5 * k + 8 * q;
          if (t == 9)  wt[k][q][t] = 60 - 5 * k - 8 * q;
          if (t == 10) wt[k][q][t] = 56;
          if (t == 0 || t == 15) wt[k][q][t] = -10 + q;
          if (t == 3 || t == 12) wt[k][q][t] = 10 - q;
        end

    repeat (4) @(posedge clk_video);
    rst_n = 1;
    // load the weight table
    for (int k = 0; k < 8; k++)
      for (int q = 0; q < 3; q++)
        for (int t = 0; t < 16; t++) begin
          @(negedge clk_sys);
          wt_we = 1;
          wt_waddr = {3'(k), 2'(q), 4'(t)};
          wt_wdata = weight_t'(wt[k][q][t]);
        end
    @(negedge clk_sys);
    wt_we = 0;

    // The frame is followed at once by a second, inverted one, whose odd
    // field begins while the first is still being scaled: it must be skipped
    // and the input buffer left as it is. Then idle blanking lines.
    fork
      begin
        ntsc_frame();
        inv = 1;
        ntsc_frame();
        inv = 0;
        forever itu_line(1'b0, 1'b1, 0);
      end
      begin
        wait (n_cap > 0);
        t0 = busy_cycles;
        // one full LCD field that starts after processing
        @(negedge lcd_vd);
        nd = 0;
        while (nd < 240 * 960) begin
          @(posedge clk_lcd);
          #1;
          if (lcd_den) begin
            row = nd / 960;
            col = (nd % 960) / 3;
            checks++;
            if (int'(lcd_din) != exp_img[row][col]) begin
              failures++;
              if (failures < 10) $display("LCD row %0d col %0d: %0d expected %0d", row, col, lcd_din, exp_img[row][col]);
            end
            nd++;
          end
        end
        n_lcd++;
      end
    join_any
    disable fork;

    checks++;
    // busy covers every state except WAIT_FOR_START
    if (busy_cycles != BR * 37 + (BR * BC - BR) * 7 + BR * BC * (CC + 3 + 1)) begin
      failures++;
      $display("processing took %0d clocks", busy_cycles);
    end
    checks++;
    if (nblk != BC * BR) failures++;
    $display("processing: %0d clocks = %0.1f us at %0.2f MHz (%0.1f frames/s)",
             busy_cycles + 1, real'(busy_cycles + 1) * SYS_NS / 1000.0, 1000.0 / SYS_NS,
             1.0e9 / (real'(busy_cycles + 1) * SYS_NS));
    $display("odd %0d even %0d skipped %0d captures %0d LOAD_MEM_36 %0d LOAD_MEM_6 %0d",
             n_odd, n_even, n_skip, n_cap, n_l36, n_l6);
    checks++;
    if (n_early != 0) begin failures++; $display("display active %0d clocks before the first image", n_early); end
    checks++;
    if (n_cap != 1) begin failures++; $display("%0d frames processed, expected 1", n_cap); end
    $display("edge-adaptive blocks per sector: %p", sect_used);
    begin
      int ns = 0;
      foreach (sect_used[k]) if (sect_used[k] > 0) ns++;
      checks++;
      if (ns < 3) begin failures++; $display("only %0d sectors used", ns); end
    end
    $display("bilinear %0d edge-adaptive %0d (near-boundary sectors %0d) zero gradients %0d weight writes %0d LCD fields %0d",
             n_bl, n_aa, n_amb, n_zero, n_wt, n_lcd);
    begin
      int m[12];
      m = '{n_odd, n_even, n_cap, n_l36, n_l6, n_bl, n_aa, n_zero, n_wt, n_lcd, n_skip, n_hold};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
