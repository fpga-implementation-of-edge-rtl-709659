// Self-checking test of the weight table: after reset every sector holds the
// bilinear kernel; random writes are then read back through the sector
// select and compared with a shadow copy kept here. Writes to position 3
// must be ignored.
module tb_weight_table;
  import scaler_pkg::*;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0;
  logic       we = 0;
  logic [8:0] waddr = '0;
  weight_t    wdata = '0;
  logic [2:0] sector = '0;
  weight_t    w [NPOS][16];
  int         shadow [8][3][16];

  weight_table dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
                    .sector(sector), .w(w));

  always #5 clk = !clk;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int k = 0; k < 8; k++) begin
      sector = 3'(k);
      #1;
      for (int p = 0; p < 3; p++)
        for (int t = 0; t < 16; t++) begin
          checks++;
          if (int'(w[p][t]) != shadow[k][p][t]) begin
            failures++;
            if (failures < 5) $display("sector %0d pos %0d tap %0d: %0d vs %0d", k, p, t, w[p][t], shadow[k][p][t]);
          end
        end
    end
  endtask

  initial begin
    for (int k = 0; k < 8; k++)
      for (int p = 0; p < 3; p++)
        for (int t = 0; t < 16; t++) begin
          shadow[k][p][t] = 0;
          if (p == 0 && (t == 5 || t == 6)) shadow[k][p][t] = 128;
          if (p == 1 && (t == 5 || t == 9)) shadow[k][p][t] = 128;
          if (p == 2 && (t == 5 || t == 6 || t == 9 || t == 10)) shadow[k][p][t] = 64;
        end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check_all();
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      we    = 1;
      waddr = 9'($urandom_range(0, 511));
      wdata = weight_t'($urandom_range(0, 1023));
      @(posedge clk);
      #1;
      we = 0;
      if (waddr[5:4] != 2'd3) shadow[waddr[8:6]][waddr[5:4]][waddr[3:0]] = int'(wdata);
    end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
