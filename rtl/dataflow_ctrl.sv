// Data-flow controller: moves pixels from the input frame buffer through the
// interpolation circuit into the output frame buffer.
//
// The 6x6 window slides over the input image one column at a time, row of
// blocks after row of blocks. For each block position the controller runs
//   LOAD_MEM_36 (37 clocks) or LOAD_MEM_6 (7 clocks), COMPUTE
//   (COMPUTE_CYCLES clocks), DATA_OUT (3 clocks), CHECK_FINISH (1 clock).
// LOAD_MEM_36 reads all 36 window pixels and is used for the first block of
// each row. Every other block overlaps the previous one in 30 pixels:
// LOAD_MEM_6 shifts the window one column to the left and reads only the new
// right-hand column of six pixels. Each read costs one clock plus one clock
// of read latency at the end. While a pixel is loaded it is also copied to
// its place in the output image (input (x,y) -> output (2x,2y)), so the
// original pixels need no separate pass. COMPUTE gives the combinational
// interpolation circuit a fixed time to settle and then samples its three
// results; DATA_OUT writes them to output (2x+1,2y), (2x,2y+1) and
// (2x+1,2y+1) where (x,y) is the input position of the anchor pixel O(1,1)
// (window row 2, column 2). CHECK_FINISH moves to the next block, to
// LOAD_MEM_36 at the start of a new row, or back to WAIT_FOR_START after the
// last block, pulsing `done`. Leaving WAIT_FOR_START on `start` takes one
// clock. All of this, including the clock counts of the load stages,
// follows the described controller.
//
// Defaults: BLOCK_COLS = 156 and BLOCK_ROWS = 115 block positions give the
// described 115 LOAD_MEM_36 and 17825 LOAD_MEM_6 passes over the 161-wide
// input buffer. COMPUTE_CYCLES = 7 is this design's choice: the described
// circuit needs about 70 ns, 7 clocks at 95.73 MHz.
//
// Buffers: the input buffer read has one clock of latency (rd_addr in one
// clock, rd_data in the next); output writes are registered.
module dataflow_ctrl
  import scaler_pkg::*;
#(
  parameter int IN_W           = 161,
  parameter int IN_H           = 121,
  parameter int OUT_W          = 2 * IN_W - 1,
  parameter int OUT_H          = 2 * IN_H - 1,
  parameter int BLOCK_COLS     = 156,
  parameter int BLOCK_ROWS     = 115,
  parameter int COMPUTE_CYCLES = 7,
  parameter int IN_ADDR_W      = $clog2(IN_W * IN_H),
  parameter int OUT_ADDR_W     = $clog2(OUT_W * OUT_H)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  // input frame buffer read port
  output logic [IN_ADDR_W-1:0]  rd_addr,
  input  pixel_t                rd_data,
  // interpolation circuit
  output win6_t                 win,
  input  trio_t                 p,
  // output frame buffer write port
  output logic                  out_we,
  output logic [OUT_ADDR_W-1:0] out_addr,
  output pixel_t                out_data,
  // status
  output df_state_t             state,
  output logic                  busy,
  output logic                  blk_done,   // three results written
  output logic                  done
);

  df_state_t  st;
  logic [7:0] cnt;
  logic [$clog2(BLOCK_COLS+1)-1:0] bx;
  logic [$clog2(BLOCK_ROWS+1)-1:0] by;
  win6_t      win_q;
  trio_t      p_q;

  // position of the pixel requested in the previous clock
  logic       pend;
  logic [2:0] pend_r, pend_c;

  // read request of this clock
  logic       req;
  logic [2:0] req_r, req_c;
  always_comb begin
    req   = 1'b0;
    req_r = '0;
    req_c = '0;
    if (st == DF_LOAD_MEM_36 && cnt < 36) begin
      req   = 1'b1;
      req_r = 3'(cnt / 6);
      req_c = 3'(cnt % 6);
    end else if (st == DF_LOAD_MEM_6 && cnt < 6) begin
      req   = 1'b1;
      req_r = 3'(cnt);
      req_c = 3'd5;
    end
    rd_addr = IN_ADDR_W'((int'(by) + int'(req_r)) * IN_W + int'(bx) + int'(req_c));
  end

  // output position of the anchor pixel
  int ax, ay;
  assign ax = int'(bx) + 2;
  assign ay = int'(by) + 2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= DF_WAIT_FOR_START;
      cnt      <= '0;
      bx       <= '0;
      by       <= '0;
      pend     <= 1'b0;
      pend_r   <= '0;
      pend_c   <= '0;
      out_we   <= 1'b0;
      out_addr <= '0;
      out_data <= '0;
      blk_done <= 1'b0;
      done     <= 1'b0;
      for (int r = 0; r < 6; r++)
        for (int c = 0; c < 6; c++) win_q[r][c] <= '0;
      for (int k = 0; k < NPOS; k++) p_q[k] <= '0;
    end else begin
      out_we   <= 1'b0;
      blk_done <= 1'b0;
      done     <= 1'b0;
      pend     <= req;
      pend_r   <= req_r;
      pend_c   <= req_c;

      // data of last clock's request: into the window and to the output image
      if (pend) begin
        win_q[pend_r][pend_c] <= rd_data;
        out_we   <= 1'b1;
        out_data <= rd_data;
        out_addr <= OUT_ADDR_W'(2 * (int'(by) + int'(pend_r)) * OUT_W
                                + 2 * (int'(bx) + int'(pend_c)));
      end

      unique case (st)
        DF_WAIT_FOR_START: begin
          cnt <= '0;
          bx  <= '0;
          by  <= '0;
          if (start) st <= DF_LOAD_MEM_36;
        end
        DF_LOAD_MEM_36: begin
          cnt <= cnt + 8'd1;
          if (cnt == 8'd36) begin
            cnt <= '0;
            st  <= DF_COMPUTE;
          end
        end
        DF_LOAD_MEM_6: begin
          if (cnt == 8'd0)  // slide the 30 kept pixels one column left
            for (int r = 0; r < 6; r++)
              for (int c = 0; c < 5; c++) win_q[r][c] <= win_q[r][c+1];
          cnt <= cnt + 8'd1;
          if (cnt == 8'd6) begin
            cnt <= '0;
            st  <= DF_COMPUTE;
          end
        end
        DF_COMPUTE: begin
          cnt <= cnt + 8'd1;
          if (int'(cnt) == COMPUTE_CYCLES - 1) begin
            p_q <= p;
            cnt <= '0;
            st  <= DF_DATA_OUT;
          end
        end
        DF_DATA_OUT: begin
          out_we   <= 1'b1;
          out_data <= p_q[cnt[1:0]];
          unique case (cnt[1:0])
            2'd0:    out_addr <= OUT_ADDR_W'((2 * ay) * OUT_W + 2 * ax + 1);
            2'd1:    out_addr <= OUT_ADDR_W'((2 * ay + 1) * OUT_W + 2 * ax);
            default: out_addr <= OUT_ADDR_W'((2 * ay + 1) * OUT_W + 2 * ax + 1);
          endcase
          cnt <= cnt + 8'd1;
          if (cnt == 8'd2) begin
            cnt      <= '0;
            blk_done <= 1'b1;
            st       <= DF_CHECK_FINISH;
          end
        end
        DF_CHECK_FINISH: begin
          if (int'(bx) == BLOCK_COLS - 1) begin
            bx <= '0;
            if (int'(by) == BLOCK_ROWS - 1) begin
              by   <= '0;
              done <= 1'b1;
              st   <= DF_WAIT_FOR_START;
            end else begin
              by <= by + 1'b1;
              st <= DF_LOAD_MEM_36;
            end
          end else begin
            bx <= bx + 1'b1;
            st <= DF_LOAD_MEM_6;
          end
        end
        default: st <= DF_WAIT_FOR_START;
      endcase
    end
  end

  assign win   = win_q;
  assign state = st;
  assign busy  = (st != DF_WAIT_FOR_START);

  // The window must never be read beyond the input image.
  initial begin
    assert (BLOCK_COLS + 5 <= IN_W && BLOCK_ROWS + 5 <= IN_H)
      else $error("block sweep exceeds the input image");
  end

endmodule
