// Self-checking test of the ITU-R.656 decoder. A random byte stream with
// inserted timing references (all eight F,V,H codes) is fed in; a reference
// model written here tracks the 4-byte window and the BLANK / ODD / EVEN
// transitions and is compared every clock. Counts that every state and every
// transition kind was visited.
module tb_itu656_decoder;
  import scaler_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic [7:0]  din = 8'h10;
  logic [31:0] window;
  logic        trs, vld;
  logic [2:0]  fvh;
  itu_state_t  state;
  int          seen[3] = '{0, 0, 0};
  int          ntrs = 0;

  itu656_decoder dut (.clk(clk), .rst_n(rst_n), .din_en(1'b1), .din(din), .window(window),
                      .trs(trs), .fvh(fvh), .newest_vld(vld), .state(state));

  always #5 clk = !clk;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, updated on the same clock edges as the decoder
  logic [31:0] mwin = '0;
  logic        mvld = 1'b0;
  int          mstate = 0;   // 0 blank, 1 odd, 2 even

  function automatic logic [7:0] xy(input logic [2:0] c);
    return {1'b1, c, c[1] ^ c[0], c[2] ^ c[0], c[2] ^ c[1], c[2] ^ c[1] ^ c[0]};
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (mvld && mwin[31:8] == 24'hFF0000) begin
        case (mstate)
          0: if (mwin[6:4] == 3'b000) mstate = 1; else if (mwin[6:4] == 3'b100) mstate = 2;
          1: if (mwin[6:4] != 3'b000 && mwin[6:4] != 3'b001) mstate = 0;
          default: if (mwin[6:4] != 3'b100 && mwin[6:4] != 3'b101) mstate = 0;
        endcase
      end
      mwin = {mwin[23:0], din};
      mvld = 1'b1;
      #1;
      checks += 3;
      if (window != mwin) failures++;
      if (trs != (mwin[31:8] == 24'hFF0000)) failures++;
      if (int'(state) != mstate) begin
        failures++;
        if (failures < 5) $display("state %0d expected %0d", state, mstate);
      end
      if (trs) begin
        ntrs++;
        checks++;
        if (fvh != mwin[6:4]) failures++;
      end
      seen[mstate]++;
    end
  end

  task automatic put(input logic [7:0] b);
    @(negedge clk);
    din = b;
  endtask

  initial begin
    logic [2:0] code;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(0, 5) == 0) begin
        // bias towards codes that move the state machine
        code = ($urandom_range(0, 1) == 0) ? 3'($urandom_range(0, 7))
             : (mstate == 0 ? ($urandom_range(0, 1) ? 3'b000 : 3'b100) : 3'($urandom_range(0, 7)));
        put(8'hFF); put(8'h00); put(8'h00); put(xy(code));
      end else begin
        put(8'($urandom_range(1, 254)));
      end
    end
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (seen[s] == 0) failures++;
    end
    $display("timing references %0d, clocks in BLANK/ODD/EVEN %0d/%0d/%0d", ntrs, seen[0], seen[1], seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
