// Output signal, timing and data-address generator for the LCD module.
//
// Produces the horizontal and vertical sync of the LCD driver and reads the
// output frame buffer in step with them. One line is H_TOTAL = 1171 DCLK:
// HD pulse, H_BLANK = 152 DCLK from the HD pulse to the first valid data,
// H_VALID = 960 DCLK of data, then the front porch (59 DCLK). One field is
// V_TOTAL = 262 lines: VD pulse, V_BLANK = 14 lines, V_VALID = 240 lines of
// data, 8 lines of front porch. These numbers are the panel's timing table;
// the display is progressive, so every field is a full frame.
//
// The panel takes its 960 data clocks per line as 320 pixels of three
// serial colour components; the scaler works on luminance only, so each
// pixel is sent three times (R = G = B = Y). That reading of 960 = 3 x 320,
// the one-DCLK HD width (HPW) and the active-low sync polarity are this
// design's choices; the VD width of one DCLK is the table's typical value.
//
// Timing: counters run on `clk` (DCLK). The buffer read address is issued
// one clock ahead; hd, vd, den and din are registered so that they line up
// with the buffer's one-clock read latency. The read address is
// row * OUT_W + column; OUT_W is the buffer's row pitch (321).
module lcd_timing_gen
  import scaler_pkg::*;
#(
  parameter int H_TOTAL  = 1171,
  parameter int H_BLANK  = 152,
  parameter int H_VALID  = 960,
  parameter int HPW      = 1,
  parameter int V_TOTAL  = 262,
  parameter int V_BLANK  = 14,
  parameter int V_VALID  = 240,
  parameter int VPW      = 1,
  parameter int SUBPIX   = 3,
  parameter int OUT_W    = 321,
  parameter int OUT_H    = 241,
  parameter int ADDR_W   = $clog2(OUT_W * OUT_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [ADDR_W-1:0] rd_addr,
  input  pixel_t            rd_data,
  output logic              hd,       // active low
  output logic              vd,       // active low
  output logic              den,      // din carries valid data
  output pixel_t            din,
  output logic              frame_start
);

  logic [$clog2(H_TOTAL)-1:0] h;
  logic [$clog2(V_TOTAL)-1:0] v;
  logic [1:0]                 sub;
  logic [$clog2(H_VALID)-1:0] px;

  wire act_h = (int'(h) >= H_BLANK) && (int'(h) < H_BLANK + H_VALID);
  wire act_v = (int'(v) >= V_BLANK) && (int'(v) < V_BLANK + V_VALID);
  wire act   = act_h && act_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h   <= '0;
      v   <= '0;
      sub <= '0;
      px  <= '0;
    end else begin
      if (int'(h) == H_TOTAL - 1) begin
        h <= '0;
        if (int'(v) == V_TOTAL - 1) v <= '0;
        else                       v <= v + 1'b1;
      end else begin
        h <= h + 1'b1;
      end
      if (act_h) begin
        if (int'(sub) == SUBPIX - 1) begin
          sub <= '0;
          px  <= px + 1'b1;
        end else begin
          sub <= sub + 2'd1;
        end
      end else begin
        sub <= '0;
        px  <= '0;
      end
    end
  end

  always_comb
    rd_addr = ADDR_W'((int'(v) - V_BLANK) * OUT_W + int'(px));

  logic act_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hd          <= 1'b1;
      vd          <= 1'b1;
      act_d       <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      hd          <= !(int'(h) < HPW);
      vd          <= !((v == '0) && (int'(h) < VPW));
      act_d       <= act;
      frame_start <= (v == '0) && (h == '0);
    end
  end

  assign den = act_d;
  assign din = act_d ? rd_data : 8'd0;

endmodule
