// Self-checking test of the complexity-degree module: random and structured
// 6x6 windows (flat, straight edge, checkerboard); the reference binarises
// against the given mean and sums the four-neighbour local gradients.
module tb_cd_module;
  import scaler_pkg::*;
  localparam int TH = 11;
  int checks = 0, failures = 0;
  win6_t      win;
  pixel_t     mean;
  logic [6:0] cd;
  logic       cd_small;
  int         nsmall = 0, nlarge = 0;

  cd_module #(.CD_TH(TH)) dut (.win(win), .mean_i(mean), .cd_o(cd), .cd_small(cd_small));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b[6][6];
    int sum, g;
    for (int n = 0; n < 3000; n++) begin
      for (int r = 0; r < 6; r++)
        for (int c = 0; c < 6; c++)
          case (n % 4)
            0: win[r][c] = pixel_t'($urandom_range(0, 255));
            1: win[r][c] = (c > 2) ? 8'd200 : 8'd30;
            2: win[r][c] = ((r + c) % 2 == 1) ? 8'd200 : 8'd30;
            default: win[r][c] = (r + c > 5) ? 8'd150 : 8'd90;
          endcase
      mean = (n % 4 == 0) ? pixel_t'($urandom_range(0, 255)) : 8'd100;
      #1;
      for (int r = 0; r < 6; r++)
        for (int c = 0; c < 6; c++) b[r][c] = (win[r][c] >= mean) ? 1 : 0;
      sum = 0;
      for (int r = 1; r <= 4; r++)
        for (int c = 1; c <= 4; c++) begin
          g = 4 * b[r][c] - (b[r-1][c] + b[r+1][c] + b[r][c-1] + b[r][c+1]);
          sum += (g < 0) ? -g : g;
        end
      checks += 2;
      if (int'(cd) != sum) begin
        failures++;
        if (failures < 5) $display("case %0d: cd %0d expected %0d", n % 4, cd, sum);
      end
      if (cd_small != (sum <= TH)) failures++;
      if (cd_small) nsmall++; else nlarge++;
    end
    checks++;
    if (nsmall == 0 || nlarge == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
