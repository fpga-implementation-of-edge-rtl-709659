// Self-checking test of the bilinear interpolator: random 4x4 blocks against
// the three averaging formulas, computed here with integer division.
module tb_bilinear_interp;
  import scaler_pkg::*;
  int checks = 0, failures = 0;
  blk4_t blk;
  trio_t p;

  bilinear_interp dut (.blk(blk), .p(p));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0, e1, e2;
    for (int n = 0; n < 2000; n++) begin
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < 4; i++)
          blk[j][i] = (n < 4) ? pixel_t'(n[0] ? 255 : 0) : pixel_t'($urandom_range(0, 255));
      #1;
      // O(i,j) = blk[j][i]
      e0 = (int'(blk[1][1]) + int'(blk[1][2])) / 2;
      e1 = (int'(blk[1][1]) + int'(blk[2][1])) / 2;
      e2 = (int'(blk[1][1]) + int'(blk[1][2]) + int'(blk[2][1]) + int'(blk[2][2])) / 4;
      checks += 3;
      if (p[0] != e0 || p[1] != e1 || p[2] != e2) begin
        failures++;
        if (failures < 5) $display("mismatch %0d %0d %0d vs %0d %0d %0d", p[0], p[1], p[2], e0, e1, e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
