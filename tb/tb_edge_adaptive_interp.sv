// Self-checking test of the edge-adaptive weighted sum: random pixels and
// random signed weights, reference computed with integers (floor of the sum
// divided by 256, clipped to 0..255). Also checks that bilinear-kernel
// weights give the bilinear result.
module tb_edge_adaptive_interp;
  import scaler_pkg::*;
  int checks = 0, failures = 0;
  blk4_t   blk;
  weight_t w [NPOS][16];
  trio_t   p;
  int      clip_lo = 0, clip_hi = 0;

  edge_adaptive_interp dut (.blk(blk), .w(w), .p(p));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floordiv256(int v);
    return (v >= 0) ? v / 256 : -((-v + 255) / 256);
  endfunction

  initial begin
    int acc, e;
    for (int n = 0; n < 3000; n++) begin
      for (int t = 0; t < 16; t++) blk[t/4][t%4] = pixel_t'($urandom_range(0, 255));
      for (int k = 0; k < NPOS; k++)
        for (int t = 0; t < 16; t++) begin
          if (n < 1000) w[k][t] = weight_t'($signed($urandom_range(0, 80)) - 20);
          else if (n < 2000) w[k][t] = weight_t'($signed($urandom_range(0, 1023)) - 512);
          else begin
            // bilinear kernel
            w[k][t] = '0;
            if (k == 0 && (t == 5 || t == 6)) w[k][t] = 128;
            if (k == 1 && (t == 5 || t == 9)) w[k][t] = 128;
            if (k == 2 && (t == 5 || t == 6 || t == 9 || t == 10)) w[k][t] = 64;
          end
        end
      #1;
      for (int k = 0; k < NPOS; k++) begin
        acc = 0;
        for (int t = 0; t < 16; t++) acc += int'(blk[t/4][t%4]) * int'(w[k][t]);
        e = floordiv256(acc);
        if (e < 0) begin e = 0; clip_lo++; end
        if (e > 255) begin e = 255; clip_hi++; end
        checks++;
        if (int'(p[k]) != e) begin
          failures++;
          if (failures < 5) $display("pos %0d: got %0d expected %0d", k, p[k], e);
        end
      end
      if (n >= 2000) begin
        checks++;
        if (int'(p[0]) != (int'(blk[1][1]) + int'(blk[1][2])) / 2 ||
            int'(p[2]) != (int'(blk[1][1]) + int'(blk[1][2]) + int'(blk[2][1]) + int'(blk[2][2])) / 4)
          failures++;
      end
    end
    checks++;
    if (clip_lo == 0 || clip_hi == 0) begin
      failures++;
      $display("clipping never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
