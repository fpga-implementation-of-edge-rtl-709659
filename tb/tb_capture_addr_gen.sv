// Self-checking test of the capture address generator. A small interlaced
// ITU-R.656 frame (24 Y samples per line, 6 odd and 5 even active lines,
// blanking lines with V = 1, EAV/SAV codes with protection bits) passes
// through the ITU-R.656 decoder into the generator, configured for an
// 8 x 7 capture window at Start_x = 5, Start_y = 2. Every buffer write is
// checked against the pixel that the frame generator placed at that field,
// line and sample; at the end every buffer address must have been written
// exactly once and frame_done must have pulsed once. A second frame with
// `arm` low must write nothing.
module tb_capture_addr_gen;
  import scaler_pkg::*;
  localparam int IN_W = 8, IN_H = 7, SX = 5, SY = 2;
  localparam int NS = 24, HB = 8, NODD = 6, NEVEN = 5;
  localparam int AW = $clog2(IN_W * IN_H);
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0, arm = 1;
  logic [7:0]  din = 8'h10;
  logic [31:0] window;
  logic        trs, vld, wr_en, capturing, frame_done;
  logic [2:0]  fvh;
  itu_state_t  state;
  logic [AW-1:0] wr_addr;
  logic [7:0]  wr_data;
  logic [10:0] count_h;
  logic [9:0]  count_v;
  int          nwrite[IN_W * IN_H];
  int          ndone = 0, total_writes = 0;

  itu656_decoder u_dec (.clk(clk), .rst_n(rst_n), .din_en(1'b1), .din(din), .window(window),
                        .trs(trs), .fvh(fvh), .newest_vld(vld), .state(state));

  capture_addr_gen #(.IN_W(IN_W), .IN_H(IN_H)) dut (
    .clk(clk), .rst_n(rst_n), .newest(window[7:0]), .newest_vld(vld), .trs(trs), .fvh(fvh),
    .state(state), .start_x(11'(SX)), .start_y(10'(SY)), .arm(arm), .wr_en(wr_en),
    .wr_addr(wr_addr), .wr_data(wr_data), .capturing(capturing), .frame_done(frame_done),
    .count_h(count_h), .count_v(count_v));

  always #5 clk = !clk;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pix(int f, int l, int s);
    return 8'(16 + ((l * 37 + s * 11 + f * 101) % 220));
  endfunction

  function automatic logic [7:0] xy(input logic [2:0] c);
    return {1'b1, c, c[1] ^ c[0], c[2] ^ c[0], c[2] ^ c[1], c[2] ^ c[1] ^ c[0]};
  endfunction

  task automatic put(input logic [7:0] b);
    @(negedge clk);
    din = b;
  endtask

  task automatic line(input logic f, input logic v, input int l);
    put(8'hFF); put(8'h00); put(8'h00); put(xy({f, v, 1'b1}));       // EAV
    for (int k = 0; k < HB; k++) put(k[0] ? 8'h10 : 8'h80);
    put(8'hFF); put(8'h00); put(8'h00); put(xy({f, v, 1'b0}));       // SAV
    for (int s = 0; s < NS; s++) begin
      put(s[0] ? 8'hC0 : 8'h40);                                     // Cb / Cr
      put(v ? 8'h10 : pix(int'(f), l, s));                           // Y
    end
  endtask

  task automatic frame();
    for (int k = 0; k < 2; k++) line(1'b1, 1'b1, 0);
    for (int k = 0; k < 3; k++) line(1'b0, 1'b1, 0);
    for (int l = 0; l < NODD; l++) line(1'b0, 1'b0, l);
    for (int k = 0; k < 2; k++) line(1'b0, 1'b1, 0);
    for (int k = 0; k < 3; k++) line(1'b1, 1'b1, 0);
    for (int l = 0; l < NEVEN; l++) line(1'b1, 1'b0, l);
    for (int k = 0; k < 2; k++) line(1'b1, 1'b1, 0);
  endtask

  always @(posedge clk) if (rst_n) begin
    if (wr_en) begin
      int row, col, f, l, s;
      total_writes++;
      row = int'(wr_addr) / IN_W;
      col = int'(wr_addr) % IN_W;
      f = row % 2;
      l = row / 2 + SY;
      s = col + SX;
      checks++;
      if (int'(wr_addr) >= IN_W * IN_H || wr_data != pix(f, l, s)) begin
        failures++;
        if (failures < 6) $display("write addr %0d data %0d, expected %0d", wr_addr, wr_data, pix(f, l, s));
      end else nwrite[wr_addr]++;
    end
    if (frame_done) ndone++;
  end

  initial begin
    int writes_after;
    foreach (nwrite[i]) nwrite[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame();
    repeat (4) @(posedge clk);
    for (int a = 0; a < IN_W * IN_H; a++) begin
      checks++;
      if (nwrite[a] != 1) begin
        failures++;
        if (failures < 6) $display("address %0d written %0d times", a, nwrite[a]);
      end
    end
    checks++;
    if (ndone != 1) begin failures++; $display("frame_done pulses %0d", ndone); end
    // not armed: nothing may be written
    arm = 0;
    writes_after = total_writes;
    frame();
    repeat (4) @(posedge clk);
    checks += 2;
    if (total_writes != writes_after) failures++;
    if (ndone != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
