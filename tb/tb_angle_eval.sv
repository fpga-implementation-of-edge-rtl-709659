// Self-checking test of the angle evaluation module. Windows are random,
// straight edges at many angles, and flat areas. For each of the 16 pixels
// the Sobel gradients are recomputed here and turned into a sector with the
// real arctangent; the RTL sector must match wherever the true angle is more
// than 4 degrees from a sector boundary (the CORDIC's five iterations are
// good to about 3.6 degrees). Zero gradients must be flagged invalid. The
// dominant sector is checked whenever no pixel is that close to a boundary.
module tb_angle_eval;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;
  int checks = 0, failures = 0;
  win6_t      win;
  logic [2:0] dom, sect [16];
  logic [4:0] dom_count;
  logic       dom_ok, avalid [16];
  int         nzero = 0, ndom = 0, sect_seen[8];

  angle_eval dut (.win(win), .dom(dom), .dom_count(dom_count), .dom_ok(dom_ok),
                  .sect(sect), .avalid(avalid));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dx, dy, k, h[8], best, bestc, amb, nvalid;
    real margin, th, nx, ny, d;
    foreach (sect_seen[i]) sect_seen[i] = 0;
    for (int n = 0; n < 4000; n++) begin
      th = real'($urandom_range(0, 3599)) / 10.0 * 3.14159265358979 / 180.0;
      nx = $cos(th); ny = $sin(th);
      for (int r = 0; r < 6; r++)
        for (int c = 0; c < 6; c++)
          case (n % 4)
            0: win[r][c] = pixel_t'($urandom_range(0, 255));
            1, 2: begin
              d = (real'(c) - 2.5) * nx + (real'(r) - 2.5) * ny;
              win[r][c] = (d > 0.0) ? 8'd200 : 8'd40;
            end
            default: win[r][c] = (n % 8 == 3) ? 8'd90 : ((c < 3) ? 8'd90 : 8'd90 + 8'(r));
          endcase
      #1;
      for (int q = 0; q < 8; q++) h[q] = 0;
      amb = 0; nvalid = 0;
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < 4; i++) begin
          sobel(win, i, j, dx, dy);
          checks++;
          if (avalid[4*j+i] != (dx != 0 || dy != 0)) failures++;
          if (dx == 0 && dy == 0) begin nzero++; continue; end
          nvalid++;
          k = ref_sector(dx, dy, margin);
          h[k]++;
          if (margin < 4.0) begin amb++; continue; end
          checks++;
          sect_seen[k]++;
          if (int'(sect[4*j+i]) != k) begin
            failures++;
            if (failures < 6) $display("dx %0d dy %0d: sector %0d expected %0d", dx, dy, sect[4*j+i], k);
          end
        end
      if (amb == 0) begin
        best = 0; bestc = h[0];
        for (int q = 1; q < 8; q++) if (h[q] > bestc) begin best = q; bestc = h[q]; end
        checks += 2;
        if (dom_ok != (bestc > 0)) failures++;
        if (bestc > 0 && (int'(dom) != best || int'(dom_count) != bestc)) failures++;
        ndom++;
      end else if (nvalid == 0) begin
        checks++;
        if (dom_ok) failures++;
      end
    end
    for (int q = 0; q < 8; q++) begin
      checks++;
      if (sect_seen[q] == 0) begin failures++; $display("sector %0d never seen", q); end
    end
    checks++;
    if (nzero == 0) failures++;
    $display("zero gradients %0d, dominant checks %0d", nzero, ndom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
