// Self-checking test of the fuzzy decision module. Random windows of four
// kinds (flat with slight noise, straight edges, checkerboard texture, a
// single outlier on a flat background) are classified by the reference
// model, which recomputes VD, SD and CD with plain integers; mode and the
// three variables must agree. Each kind of decision (not visible, noise,
// texture, edge) must occur.
module tb_fuzzy_decision;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;
  int checks = 0, failures = 0;
  win6_t        win;
  interp_mode_t mode;
  logic         vd_pos, sd_big, cd_small;
  logic [6:0]   cd;
  pixel_t       mean;
  int           n_invisible = 0, n_noise = 0, n_texture = 0, n_edge = 0;

  fuzzy_decision dut (.win(win), .mode(mode), .vd_pos(vd_pos), .sd_big(sd_big),
                      .cd_small(cd_small), .cd(cd), .mean(mean));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit aa, vd, sb;
    int cdr, base;
    for (int n = 0; n < 4000; n++) begin
      base = $urandom_range(20, 200);
      for (int r = 0; r < 6; r++)
        for (int c = 0; c < 6; c++)
          case (n % 4)
            0: win[r][c] = pixel_t'(base + $urandom_range(0, 5));
            1: win[r][c] = (c + r * (n % 3) > 2 + 3 * (n % 3) - ((n % 3) == 2 ? 1 : 0)) ? pixel_t'(base + 50) : pixel_t'(base);
            2: win[r][c] = ((r + c) % 2 == 0) ? pixel_t'(base + 40) : pixel_t'(base);
            default: win[r][c] = (r == 2 && c == 3) ? pixel_t'(base + 50) : pixel_t'(base);
          endcase
      #1;
      aa = fuzzy_aa(win, 4, 11, vd, sb, cdr);
      checks += 5;
      if ((mode == MODE_AA) != aa) failures++;
      if (vd_pos != vd) failures++;
      if (sd_big != sb) failures++;
      if (int'(cd) != cdr) begin
        failures++;
        if (failures < 5) $display("kind %0d: cd %0d expected %0d", n % 4, cd, cdr);
      end
      if (cd_small != (cdr <= 11)) failures++;
      if (!vd) n_invisible++;
      else if (sb) n_noise++;
      else if (cdr > 11) n_texture++;
      else n_edge++;
    end
    checks += 4;
    if (n_invisible == 0) failures++;
    if (n_noise == 0) failures++;
    if (n_texture == 0) failures++;
    if (n_edge == 0) failures++;
    $display("invisible %0d noise %0d texture %0d edge %0d", n_invisible, n_noise, n_texture, n_edge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
