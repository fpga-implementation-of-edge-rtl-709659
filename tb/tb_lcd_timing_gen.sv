// Self-checking test of the LCD timing generator at the panel's own timing
// (1171 DCLK per line, 262 lines per field). The output frame buffer is
// modelled with a one-clock read and a content that is a known function of
// the address. Over two fields the test measures, from the outputs only:
// HD period and width, VD period, the 152 DCLK from HD to the first data,
// 960 data clocks per line, 14 blank lines before and 240 data lines per
// field, and that each data clock carries the pixel (column = data clock / 3)
// of the right buffer row.
module tb_lcd_timing_gen;
  import scaler_pkg::*;
  localparam int OUT_W = 321, OUT_H = 241;
  localparam int AW = $clog2(OUT_W * OUT_H);
  int checks = 0, failures = 0;
  logic          clk = 0, rst_n = 0;
  logic [AW-1:0] rd_addr;
  pixel_t        rd_data;
  logic          hd, vd, den, fs;
  pixel_t        din;

  lcd_timing_gen dut (.clk(clk), .rst_n(rst_n), .rd_addr(rd_addr), .rd_data(rd_data),
                      .hd(hd), .vd(vd), .den(den), .din(din), .frame_start(fs));

  always #27 clk = !clk;

  function automatic pixel_t content(int a);
    return pixel_t'((a * 7 + a / 321 * 13 + 3) % 256);
  endfunction

  always @(posedge clk) rd_data <= content(int'(rd_addr));

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t = 0, last_hd = -1, last_vd = -1, hd_low = 0, line_den = 0, first_den = -1;
    int lines_since_vd = -1, data_lines = 0, first_data_line = -1, row = -1, nvd = 0;
    logic den_prev = 0, hd_prev = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (nvd < 3) begin
      @(posedge clk);
      #1;
      t++;
      // HD
      if (!hd) hd_low++;
      if (!hd && hd_prev) begin
        if (last_hd >= 0) begin
          checks += 2;
          if (t - last_hd != 1171) failures++;
          if (line_den != 0 && line_den != 960) begin failures++; $display("line with %0d data clocks", line_den); end
          if (line_den == 960) begin
            checks++;
            if (first_den != 152) begin failures++; $display("data starts %0d after HD", first_den); end
          end
        end
        last_hd = t;
        line_den = 0;
        first_den = -1;
        if (lines_since_vd >= 0) lines_since_vd++;
      end
      if (hd && !hd_prev) begin
        checks++;
        if (hd_low != 1) failures++;
        hd_low = 0;
      end
      // VD
      if (!vd) begin
        if (last_vd >= 0) begin
          checks += 2;
          if (t - last_vd != 262 * 1171) failures++;
          if (data_lines != 240) begin failures++; $display("%0d data lines", data_lines); end
        end
        nvd++;
        last_vd = t;
        lines_since_vd = 0;
        data_lines = 0;
        first_data_line = -1;
        row = -1;
      end
      // data
      if (den) begin
        if (!den_prev) begin
          first_den = t - last_hd;
          data_lines++;
          row++;
          if (first_data_line < 0) begin
            first_data_line = lines_since_vd;
            checks++;
            if (last_vd >= 0 && first_data_line != 14) begin failures++; $display("first data line %0d", first_data_line); end
          end
        end
        checks++;
        if (row >= 0 && din != content(row * OUT_W + line_den / 3)) begin
          failures++;
          if (failures < 6) $display("row %0d clk %0d: din %0d", row, line_den, din);
        end
        line_den++;
      end
      den_prev = den;
      hd_prev = hd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
