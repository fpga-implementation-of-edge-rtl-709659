// Self-checking test of the CORDIC arctangent: random gradients over the
// full Sobel range in all four quadrants, compared with the real atan2 of
// the same vector. Five iterations leave at most about 3.6 degrees of
// residual error; small vectors lose a little more to truncation, so the
// tolerance is 4 degrees for |v| >= 32 and 8 degrees below. Also checks the
// zero-vector flag and the exact axis directions.
module tb_cordic_atan;
  int checks = 0, failures = 0;
  logic signed [10:0] dx, dy;
  logic signed [12:0] angle;
  logic               valid;
  real                maxerr = 0.0;
  int                 quad[4] = '{0, 0, 0, 0};

  cordic_atan dut (.dx(dx), .dy(dy), .angle(angle), .valid(valid));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ref_deg, got, err, mag, tol;
    int xs[4] = '{500, 0, -500, 0};
    int ys[4] = '{0, 500, 0, -500};
    for (int n = 0; n < 5000; n++) begin
      if (n < 4) begin
        dx = 11'(xs[n]); dy = 11'(ys[n]);
      end else if (n == 4) begin
        dx = 0; dy = 0;
      end else begin
        dx = 11'($signed($urandom_range(0, 2040)) - 1020);
        dy = 11'($signed($urandom_range(0, 2040)) - 1020);
      end
      #1;
      checks++;
      if (valid != (dx != 0 || dy != 0)) failures++;
      if (dx == 0 && dy == 0) continue;
      ref_deg = $atan2(real'(dy), real'(dx)) * 180.0 / 3.14159265358979;
      got     = real'(angle) / 16.0;
      err     = got - ref_deg;
      while (err > 180.0)  err -= 360.0;
      while (err < -180.0) err += 360.0;
      if (err < 0) err = -err;
      mag = $sqrt(real'(dx) * real'(dx) + real'(dy) * real'(dy));
      tol = (mag >= 32.0) ? 4.0 : 8.0;
      if (mag >= 32.0 && err > maxerr) maxerr = err;
      quad[(dx < 0 ? 2 : 0) + (dy < 0 ? 1 : 0)]++;
      checks++;
      if (err > tol) begin
        failures++;
        if (failures < 6) $display("dx %0d dy %0d: got %f expected %f", dx, dy, got, ref_deg);
      end
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad[q] == 0) failures++;
    end
    $display("largest error %f degrees", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
