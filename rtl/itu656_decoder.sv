// ITU-R.656 decoder: timing-reference detection and field tracking.
//
// Every byte of the 8-bit ITU-R.656 stream is shifted into a 32-bit window of
// four byte cells, newest byte in the lowest cell. When the three older cells
// hold FF 00 00 the newest cell is the XY byte of a timing reference (SAV or
// EAV) and its bits 6..4 are F, V and H. A three-state machine (BLANK,
// ODD FIELD, EVEN FIELD) follows these codes:
//   BLANK: FVH = 000 -> ODD, FVH = 100 -> EVEN, anything else stays.
//   ODD  : stays on FVH 000 or 001, any other code -> BLANK.
//   EVEN : stays on FVH 100 or 101, any other code -> BLANK.
// The window, the FF 00 00 test and the transition rules follow the
// described decoder; the exact output bundle is this design's own.
//
// Interface: one byte per clock on `din` when `din_en` is high (the 27 MHz
// line-locked clock of the video decoder, so `din_en` is normally tied high).
// Timing: `window`, `trs`, `fvh` and `state` are registered and describe the
// byte entered on the previous enabled clock; `state` changes on the clock
// after the timing reference that causes the change was entered.
module itu656_decoder
  import scaler_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       din_en,
  input  logic [7:0] din,
  output logic [31:0] window,   // {oldest, ..., newest}
  output logic       trs,       // window holds FF 00 00 XY
  output logic [2:0] fvh,       // F, V, H of the last timing reference
  output logic       newest_vld,// a new byte entered the window last clock
  output itu_state_t state
);

  logic [31:0] win_q;
  logic        vld_q;
  itu_state_t  state_q, state_d;
  logic [2:0]  fvh_q;

  wire        is_trs  = (win_q[31:8] == 24'hFF_00_00);
  wire [2:0]  cur_fvh = win_q[6:4];

  always_comb begin
    state_d = state_q;
    if (vld_q && is_trs) begin
      unique case (state_q)
        ITU_BLANK: begin
          if (cur_fvh == 3'b000)      state_d = ITU_ODD;
          else if (cur_fvh == 3'b100) state_d = ITU_EVEN;
        end
        ITU_ODD:  if (cur_fvh != 3'b000 && cur_fvh != 3'b001) state_d = ITU_BLANK;
        ITU_EVEN: if (cur_fvh != 3'b100 && cur_fvh != 3'b101) state_d = ITU_BLANK;
        default:  state_d = ITU_BLANK;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_q   <= '0;
      vld_q   <= 1'b0;
      state_q <= ITU_BLANK;
      fvh_q   <= 3'b011;
    end else begin
      vld_q   <= din_en;
      if (din_en) win_q <= {win_q[23:0], din};
      state_q <= state_d;
      if (vld_q && is_trs) fvh_q <= cur_fvh;
    end
  end

  assign window     = win_q;
  assign trs        = vld_q && is_trs;
  assign fvh        = is_trs ? cur_fvh : fvh_q;
  assign newest_vld = vld_q;
  assign state      = state_q;

endmodule
