// Self-checking test of the data-flow controller on a small image
// (10 x 9 input, 5 x 4 block positions, 3 compute clocks). The input frame
// buffer is modelled here with its one-clock read latency, and the
// interpolation circuit is replaced by a simple function of the window so
// that every window position can be recognised in the output. Checks:
//   - the window in COMPUTE equals the 6x6 image patch at the block position,
//   - every written output pixel: originals at (2x,2y), the three results at
//     (2x+1,2y), (2x,2y+1), (2x+1,2y+1) of the anchor pixel,
//   - every clock count: one LOAD_MEM_36 per block row (37 clocks), a
//     LOAD_MEM_6 (7 clocks) for every other block, COMPUTE, 3 DATA_OUT and
//     1 CHECK_FINISH clocks, plus the one clock of leaving WAIT_FOR_START.
// A second frame is run to check the return to WAIT_FOR_START.
module tb_dataflow_ctrl;
  import scaler_pkg::*;
  localparam int IN_W = 10, IN_H = 9, BC = 5, BR = 4, CC = 3;
  localparam int OUT_W = 2 * IN_W - 1, OUT_H = 2 * IN_H - 1;
  localparam int IAW = $clog2(IN_W * IN_H), OAW = $clog2(OUT_W * OUT_H);
  int checks = 0, failures = 0;
  logic           clk = 0, rst_n = 0, start = 0;
  logic [IAW-1:0] rd_addr;
  pixel_t         rd_data;
  win6_t          win;
  trio_t          p;
  logic           out_we, busy, blk_done, done;
  logic [OAW-1:0] out_addr;
  pixel_t         out_data;
  df_state_t      state;
  pixel_t         img [IN_H][IN_W];
  int             outimg [OUT_H][OUT_W];
  int             cyc[6];
  int             n36 = 0, n6 = 0, nblk = 0;
  df_state_t      prev;

  dataflow_ctrl #(.IN_W(IN_W), .IN_H(IN_H), .BLOCK_COLS(BC), .BLOCK_ROWS(BR),
                  .COMPUTE_CYCLES(CC)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .rd_addr(rd_addr), .rd_data(rd_data),
    .win(win), .p(p), .out_we(out_we), .out_addr(out_addr), .out_data(out_data),
    .state(state), .busy(busy), .blk_done(blk_done), .done(done));

  always #5 clk = !clk;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input buffer model: registered read
  always @(posedge clk) rd_data <= img[int'(rd_addr) / IN_W][int'(rd_addr) % IN_W];

  // stand-in for the interpolation circuit
  always_comb begin
    p[0] = win[2][2] ^ 8'h5A;
    p[1] = win[3][3] + win[0][0];
    p[2] = win[5][5] - win[1][4];
  end

  function automatic int f0(int x, int y); return int'(img[y+2][x+2] ^ 8'h5A); endfunction
  function automatic int f1(int x, int y); return int'(8'(img[y+3][x+3] + img[y][x])); endfunction
  function automatic int f2(int x, int y); return int'(8'(img[y+5][x+5] - img[y+1][x+4])); endfunction

  int bx = 0, by = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      cyc[int'(state)]++;
      if (state == DF_LOAD_MEM_36 && prev != DF_LOAD_MEM_36) n36++;
      if (state == DF_LOAD_MEM_6 && prev != DF_LOAD_MEM_6) n6++;
      if (state == DF_COMPUTE && prev != DF_COMPUTE) begin
        checks++;
        for (int r = 0; r < 6; r++)
          for (int c = 0; c < 6; c++)
            if (win[r][c] != img[by + r][bx + c]) begin
              failures++;
              if (failures < 5) $display("block %0d,%0d window %0d,%0d wrong", bx, by, r, c);
              r = 6;
              break;
            end
      end
      if (out_we) outimg[int'(out_addr) / OUT_W][int'(out_addr) % OUT_W] = int'(out_data);
      if (blk_done) begin
        nblk++;
        bx++;
        if (bx == BC) begin bx = 0; by++; end
        if (by == BR) by = 0;
      end
      prev = state;
    end
  end

  task automatic run_frame(output int cycles);
    foreach (cyc[i]) cyc[i] = 0;
    for (int y = 0; y < OUT_H; y++) for (int x = 0; x < OUT_W; x++) outimg[y][x] = -1;
    n36 = 0; n6 = 0; nblk = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    int cycles, expect_cycles, e;
    for (int y = 0; y < IN_H; y++) for (int x = 0; x < IN_W; x++) img[y][x] = pixel_t'($urandom_range(0, 255));
    prev = DF_WAIT_FOR_START;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int frame = 0; frame < 2; frame++) begin
      run_frame(cycles);
      repeat (3) @(negedge clk);
      expect_cycles = 1 + BR * 37 + BR * (BC - 1) * 7 + BR * BC * (CC + 3 + 1);
      checks += 8;
      if (cycles != expect_cycles) begin failures++; $display("frame cycles %0d expected %0d", cycles, expect_cycles); end
      if (n36 != BR) failures++;
      if (n6 != BR * (BC - 1)) failures++;
      if (cyc[DF_LOAD_MEM_36] != BR * 37) failures++;
      if (cyc[DF_LOAD_MEM_6] != BR * (BC - 1) * 7) failures++;
      if (cyc[DF_DATA_OUT] != BR * BC * 3 || cyc[DF_CHECK_FINISH] != BR * BC) failures++;
      if (cyc[DF_COMPUTE] != BR * BC * CC) failures++;
      if (state != DF_WAIT_FOR_START || busy) failures++;
      // originals of every pixel the window covered
      for (int y = 0; y < BR + 5; y++)
        for (int x = 0; x < BC + 5; x++) begin
          checks++;
          if (outimg[2 * y][2 * x] != int'(img[y][x])) failures++;
        end
      // the three new pixels of every block
      for (int y = 0; y < BR; y++)
        for (int x = 0; x < BC; x++) begin
          checks += 3;
          e = f0(x, y);
          if (outimg[2 * (y + 2)][2 * (x + 2) + 1] != e) failures++;
          e = f1(x, y);
          if (outimg[2 * (y + 2) + 1][2 * (x + 2)] != e) failures++;
          e = f2(x, y);
          if (outimg[2 * (y + 2) + 1][2 * (x + 2) + 1] != e) begin
            failures++;
            if (failures < 5) $display("P(1,-1) of block %0d,%0d", x, y);
          end
        end
      $display("frame %0d: %0d clocks, %0d LOAD_MEM_36, %0d LOAD_MEM_6, %0d blocks", frame, cycles, n36, n6, nblk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
