// Frame buffer: one-dimensional pixel memory with one write port and one
// read port on separate clocks.
//
// The scaler keeps two of these: the input frame buffer, written by the
// capture circuit at the video clock and read by the data-flow controller,
// and the output frame buffer, written by the data-flow controller and read
// by the LCD timing generator. Pixels are stored row after row (address =
// row * width + column), as in the mapping of the capture window onto a
// 1-D memory array. The depth is a parameter; the defaults are the input
// buffer's 161 x 121 = 19481 bytes.
//
// This design's own choices: a registered read (data one read clock after the
// address, which suits FPGA block RAM) and an all-zero initial content so
// that output pixels that are never interpolated show as black.
module frame_buffer #(
  parameter int DEPTH  = 19481,
  parameter int DATA_W = 8,
  parameter int ADDR_W = $clog2(DEPTH)
) (
  input  logic              wclk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              rclk,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge wclk) begin
    if (we && (int'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    if (int'(raddr) < DEPTH) rdata <= mem[raddr];
    else                     rdata <= '0;
  end

endmodule
