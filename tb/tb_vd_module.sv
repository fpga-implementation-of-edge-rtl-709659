// Self-checking test of the visibility-degree module: max, min, D and the
// threshold decision against a sort of the 16 pixels, including blocks right
// at the threshold.
module tb_vd_module;
  import scaler_pkg::*;
  localparam int TH = 4;
  int checks = 0, failures = 0;
  blk4_t  blk;
  pixel_t mx, mn, d;
  logic   vd_pos;
  int     npos = 0, nneg = 0;

  vd_module #(.VIS_TH(TH)) dut (.blk(blk), .max_o(mx), .min_o(mn), .d_o(d), .vd_pos(vd_pos));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v[16];
    int base, spread;
    for (int n = 0; n < 3000; n++) begin
      base   = $urandom_range(0, 200);
      spread = (n % 3 == 0) ? $urandom_range(0, 8) : $urandom_range(0, 55);
      for (int t = 0; t < 16; t++) begin
        v[t] = base + $urandom_range(0, spread);
        blk[t/4][t%4] = pixel_t'(v[t]);
      end
      #1;
      v.sort();
      checks += 4;
      if (int'(mx) != v[15]) failures++;
      if (int'(mn) != v[0]) failures++;
      if (int'(d) != v[15] - v[0]) failures++;
      if (vd_pos != (v[15] - v[0] > TH)) failures++;
      if (vd_pos) npos++; else nneg++;
    end
    checks++;
    if (npos == 0 || nneg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
