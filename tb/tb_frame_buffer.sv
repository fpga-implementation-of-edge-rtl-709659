// Self-checking test of the frame buffer: writes on one clock, reads on an
// unrelated clock with one clock of read latency; checks the zero initial
// content, random write/read-back against a shadow array, and the last
// address of the default (161 x 121) depth.
module tb_frame_buffer;
  int checks = 0, failures = 0;
  localparam int DEPTH = 19481;
  localparam int AW = $clog2(DEPTH);
  logic          wclk = 0, rclk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [7:0]    wdata = '0, rdata;
  int            shadow [DEPTH];

  frame_buffer dut (.wclk(wclk), .we(we), .waddr(waddr), .wdata(wdata),
                    .rclk(rclk), .raddr(raddr), .rdata(rdata));

  always #5 wclk = !wclk;
  always #7 rclk = !rclk;

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(input int a, input int exp);
    @(negedge rclk);
    raddr = AW'(a);
    @(posedge rclk);
    #1;
    checks++;
    if (int'(rdata) != exp) begin
      failures++;
      if (failures < 5) $display("addr %0d: %0d vs %0d", a, rdata, exp);
    end
  endtask

  initial begin
    int a;
    for (int i = 0; i < DEPTH; i++) shadow[i] = 0;
    for (int i = 0; i < 50; i++) rd($urandom_range(0, DEPTH - 1), 0);
    for (int n = 0; n < 3000; n++) begin
      @(negedge wclk);
      we    = 1;
      a     = (n == 0) ? DEPTH - 1 : $urandom_range(0, DEPTH - 1);
      waddr = AW'(a);
      wdata = 8'($urandom_range(0, 255));
      shadow[a] = int'(wdata);
      @(posedge wclk);
      #1;
      we = 0;
      if (n % 3 == 0) rd(a, shadow[a]);
    end
    for (int n = 0; n < 1000; n++) begin
      a = $urandom_range(0, DEPTH - 1);
      rd(a, shadow[a]);
    end
    rd(DEPTH - 1, shadow[DEPTH - 1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
