// Capture-window address generator for the input frame buffer.
//
// Works on the byte stream seen through the ITU-R.656 decoder window and
// writes the luminance samples of a user-placed IN_W x IN_H window of the
// interlaced frame into a one-dimensional frame buffer, odd-field lines on
// even buffer rows and even-field lines on odd buffer rows:
//   odd field : addr = (Count_v - Start_y) * (2*IN_W) + (Count_h - Start_x)
//   even field: addr = (Count_v - Start_y) * (2*IN_W) + (Count_h - Start_x) + IN_W
// Count_h is cleared at every SAV and counts Y samples; Count_v is cleared in
// BLANK and counts the SAVs of the current field (FVH 000 in the odd field,
// 100 in the even field). A 2-bit phase counter, cleared at SAV, marks the
// Y bytes of the Cb Y Cr Y sequence (phases 1 and 3). These rules follow
// the described capture circuit.
//
// This design's own additions: an `active` flag between SAV and EAV so that
// horizontal-blanking bytes are never taken for pixels, and a capture
// handshake: when `arm` is high at the start of an odd field the circuit
// captures that odd field and the following even field, then pulses
// `frame_done` when the even field ends. Nothing is written while not
// capturing, so the buffer is stable while the scaler reads it.
//
// Timing: `wr_en/wr_addr/wr_data` are registered, one clock after the byte
// appeared as the newest byte of the decoder window.
module capture_addr_gen
  import scaler_pkg::*;
#(
  parameter int IN_W   = 161,
  parameter int IN_H   = 121,
  parameter int ADDR_W = $clog2(IN_W * IN_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the ITU-R.656 decoder
  input  logic [7:0]        newest,      // newest byte of the window
  input  logic              newest_vld,
  input  logic              trs,
  input  logic [2:0]        fvh,
  input  itu_state_t        state,
  // user placement of the capture window (push buttons on the board)
  input  logic [10:0]       start_x,     // in Y samples
  input  logic [9:0]        start_y,     // in field lines
  input  logic              arm,
  // input frame buffer write port
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [7:0]        wr_data,
  output logic              capturing,
  output logic              frame_done,
  output logic [10:0]       count_h,
  output logic [9:0]        count_v
);

  logic [10:0] ch_q;
  logic [9:0]  cv_q;
  logic [1:0]  phase_q;
  logic        active_q;
  logic        cap_q;

  wire sav_odd  = trs && (fvh == 3'b000);
  wire sav_even = trs && (fvh == 3'b100);
  wire is_sav   = trs && !fvh[0];
  wire is_y     = phase_q[0];                 // phases 1 and 3
  wire even_f   = (state == ITU_EVEN);

  // Position inside the capture window.
  logic signed [12:0] col;
  logic signed [11:0] line;
  logic signed [13:0] row;
  logic               in_win;
  always_comb begin
    col    = $signed({2'b00, ch_q}) - $signed({2'b00, start_x});
    line   = $signed({2'b00, cv_q}) - $signed({2'b00, start_y});
    row    = 14'(2 * line) + (even_f ? 14'sd1 : 14'sd0);
    in_win = (col >= 0) && (int'(col) < IN_W) && (line >= 0) && (int'(row) < IN_H);
  end

  // Start of a capture: the BLANK -> ODD transition while armed.
  wire cap_start = arm && (state == ITU_BLANK) && sav_odd;
  // End of a capture: the EVEN -> BLANK transition.
  wire cap_end   = (state == ITU_EVEN) && trs && (fvh != 3'b100) && (fvh != 3'b101);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch_q       <= '0;
      cv_q       <= '0;
      phase_q    <= '0;
      active_q   <= 1'b0;
      cap_q      <= 1'b0;
      wr_en      <= 1'b0;
      wr_addr    <= '0;
      wr_data    <= '0;
      frame_done <= 1'b0;
    end else begin
      wr_en      <= 1'b0;
      frame_done <= 1'b0;
      if (newest_vld) begin
        if (state == ITU_BLANK) begin
          ch_q     <= '0;
          cv_q     <= '0;
          phase_q  <= '0;
          // the SAV that ends BLANK also opens the first active line
          active_q <= sav_odd || sav_even;
          if (cap_start) cap_q <= 1'b1;
        end else if (trs) begin
          if (is_sav) begin
            ch_q     <= '0;
            phase_q  <= '0;
            active_q <= 1'b1;
          end else begin
            active_q <= 1'b0;
          end
          if ((state == ITU_ODD && sav_odd) || (state == ITU_EVEN && sav_even))
            cv_q <= cv_q + 10'd1;
          if (cap_end && cap_q) begin
            cap_q      <= 1'b0;
            frame_done <= 1'b1;
          end
        end else if (active_q) begin
          phase_q <= phase_q + 2'd1;
          if (is_y) begin
            ch_q <= ch_q + 11'd1;
            if (cap_q && in_win) begin
              wr_en   <= 1'b1;
              wr_addr <= ADDR_W'(int'(line) * (2 * IN_W) + int'(col) + (even_f ? IN_W : 0));
              wr_data <= newest;
            end
          end
        end
      end
    end
  end

  assign capturing = cap_q;
  assign count_h   = ch_q;
  assign count_v   = cv_q;

endmodule
