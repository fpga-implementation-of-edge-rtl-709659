// Self-checking test of the structure-degree module: exhaustive-style sweep of
// max, min and mean values; the reference applies the rule "SD is big unless
// (max - min) >> 1 exceeds |(max - mean) - (mean - min)|".
module tb_sd_module;
  import scaler_pkg::*;
  int checks = 0, failures = 0;
  pixel_t mx, mn, mean, numer;
  logic   sd_big;
  int     nbig = 0, nsmall = 0;

  sd_module dut (.max_i(mx), .min_i(mn), .mean_i(mean), .numer_o(numer), .sd_big(sd_big));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, m, num, ref_big;
    for (int n = 0; n < 20000; n++) begin
      a = $urandom_range(0, 255);
      b = $urandom_range(0, a);
      m = $urandom_range(b, a);
      mx = pixel_t'(a); mn = pixel_t'(b); mean = pixel_t'(m);
      #1;
      num = (a - m) - (m - b);
      if (num < 0) num = -num;
      ref_big = ((a - b) / 2 > num) ? 0 : 1;
      checks += 2;
      if (int'(numer) != num) failures++;
      if (int'(sd_big) != ref_big) begin
        failures++;
        if (failures < 5) $display("max %0d min %0d mean %0d: got %0d", a, b, m, sd_big);
      end
      if (sd_big) nbig++; else nsmall++;
    end
    checks++;
    if (nbig == 0 || nsmall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
