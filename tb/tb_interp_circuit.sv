// Self-checking test of the image interpolation circuit. A distinct weight
// set is loaded for every sector (a sector-dependent blend of the block's
// centre pixels, with some negative taps), then random, flat, texture and
// straight-edge windows are applied. For every window the reference model
// decides BL or AA from the fuzzy rules and whether any gradient is
// non-zero; BL windows must give the bilinear pixels, AA windows the
// weighted sums of the sector the circuit reports, and that sector must be
// the reference sector where the edge angle is not near a boundary.
module tb_interp_circuit;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;
  int checks = 0, failures = 0;
  logic         clk = 0, rst_n = 0;
  win6_t        win;
  logic         wt_we = 0;
  logic [8:0]   wt_waddr = '0;
  weight_t      wt_wdata = '0;
  trio_t        p;
  interp_mode_t mode, fuzzy_mode;
  logic [2:0]   sector;
  logic         angle_ok;
  int           wt [8][3][16];
  int           n_bl = 0, n_aa = 0, aa_sect[8];

  interp_circuit dut (.clk(clk), .rst_n(rst_n), .win(win), .wt_we(wt_we), .wt_waddr(wt_waddr),
                      .wt_wdata(wt_wdata), .p(p), .mode(mode), .fuzzy_mode(fuzzy_mode),
                      .sector(sector), .angle_ok(angle_ok));

  always #5 clk = !clk;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit aa, vd, sb, anyg;
    int cdr, dx, dy, ks, h[8], best, bestc, amb, e;
    int wv[16];
    real margin, th, d;
    foreach (aa_sect[i]) aa_sect[i] = 0;
    // sector-dependent weights: 256 split over taps 5, 6, 9, 10 plus small
    // negative side lobes, different for every sector and position
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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++)
      for (int q = 0; q < 3; q++)
        for (int t = 0; t < 16; t++) begin
          @(negedge clk);
          wt_we = 1;
          wt_waddr = {3'(k), 2'(q), 4'(t)};
          wt_wdata = weight_t'(wt[k][q][t]);
        end
    @(negedge clk);
    wt_we = 0;
    for (int n = 0; n < 4000; n++) begin
      th = real'($urandom_range(0, 3599)) / 10.0 * 3.14159265358979 / 180.0;
      for (int r = 0; r < 6; r++)
        for (int c = 0; c < 6; c++)
          case (n % 4)
            0: win[r][c] = pixel_t'($urandom_range(0, 255));
            1: win[r][c] = pixel_t'(100 + $urandom_range(0, 3));
            2: win[r][c] = ((r + c) % 2 == 0) ? 8'd180 : 8'd60;
            default: begin
              d = (real'(c) - 2.5) * $cos(th) + (real'(r) - 2.5) * $sin(th);
              win[r][c] = (d > 0.0) ? 8'd210 : 8'd30;
            end
          endcase
      @(negedge clk);
      aa = fuzzy_aa(win, 4, 11, vd, sb, cdr);
      anyg = 0; amb = 0;
      for (int q = 0; q < 8; q++) h[q] = 0;
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < 4; i++) begin
          sobel(win, i, j, dx, dy);
          if (dx != 0 || dy != 0) begin
            anyg = 1;
            ks = ref_sector(dx, dy, margin);
            h[ks]++;
            if (margin < 4.0) amb++;
          end
        end
      checks += 2;
      if ((fuzzy_mode == MODE_AA) != aa) failures++;
      if ((mode == MODE_AA) != (aa && anyg)) failures++;
      if (mode == MODE_AA) begin
        n_aa++;
        aa_sect[sector]++;
        if (amb == 0) begin
          best = 0; bestc = h[0];
          for (int q = 1; q < 8; q++) if (h[q] > bestc) begin best = q; bestc = h[q]; end
          checks++;
          if (int'(sector) != best) failures++;
        end
        for (int q = 0; q < 3; q++) begin
          for (int t = 0; t < 16; t++) wv[t] = wt[sector][q][t];
          e = weighted(win, wv);
          checks++;
          if (int'(p[q]) != e) begin
            failures++;
            if (failures < 6) $display("AA sector %0d pos %0d: %0d expected %0d", sector, q, p[q], e);
          end
        end
      end else begin
        n_bl++;
        for (int q = 0; q < 3; q++) begin
          checks++;
          if (int'(p[q]) != bilinear(win, q)) failures++;
        end
      end
    end
    checks += 2;
    if (n_bl == 0 || n_aa == 0) failures++;
    if (aa_sect[0] == 0 || aa_sect[4] == 0) failures++;
    $display("bilinear blocks %0d, edge-adaptive blocks %0d", n_bl, n_aa);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
