// Angle evaluation module.
//
// For each of the 16 pixels O(i,j) of the sliding block it forms the Sobel
// gradients
//   Dx(i,j) = O(i-1,j-1) + 2 O(i-1,j) + O(i-1,j+1)
//           - (O(i+1,j-1) + 2 O(i+1,j) + O(i+1,j+1))
//   Dy(i,j) = O(i-1,j-1) + 2 O(i,j-1) + O(i+1,j-1)
//           - (O(i-1,j+1) + 2 O(i,j+1) + O(i+1,j+1))
// from its 3x3 neighbourhood in the 6x6 window (i is the column, j the row),
// feeds them to one CORDIC each, and turns the CORDIC angle z into the
// orientation A = -z (the minus sign of A = -(180/pi) atan(Dy/Dx)). A is
// quantised to the nearest multiple of 22.5 degrees and taken modulo 180
// degrees, giving a sector k = 0..7. The main angle decision module then
// picks the most frequent sector. Sixteen parallel CORDICs and the
// equations follow the described design; the rounding to the nearest
// sector is this design's reading of "quantized into eight sectors".
// Purely combinational.
module angle_eval
  import scaler_pkg::*;
#(
  parameter int VOTE_TH = 0
) (
  input  win6_t       win,
  output logic [2:0]  dom,
  output logic [4:0]  dom_count,
  output logic        dom_ok,
  output logic [2:0]  sect  [16],   // per pixel, index 4*j + i
  output logic        avalid [16]
);

  localparam int ZW = 13;

  logic signed [10:0] dx [16];
  logic signed [10:0] dy [16];
  logic signed [ZW-1:0] z [16];

  // O(i,j) = win[j+1][i+1]; a pixel of the window as a signed gradient term.
  function automatic logic signed [10:0] px(input win6_t w, input int r, input int c);
    return 11'($signed({1'b0, w[r][c]}));
  endfunction

  always_comb begin
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 4; i++) begin
        // window coordinates of O(i,j): row j+1, column i+1
        dx[4*j+i] = px(win, j,   i) + 2 * px(win, j+1, i) + px(win, j+2, i)
                  - px(win, j,   i+2) - 2 * px(win, j+1, i+2) - px(win, j+2, i+2);
        dy[4*j+i] = px(win, j,   i) + 2 * px(win, j,   i+1) + px(win, j,   i+2)
                  - px(win, j+2, i) - 2 * px(win, j+2, i+1) - px(win, j+2, i+2);
      end
  end

  for (genvar n = 0; n < 16; n++) begin : g_cordic
    cordic_atan #(.IN_W(11), .ITER(5), .FRAC(4), .Z_W(ZW)) u_cordic (
      .dx(dx[n]), .dy(dy[n]), .angle(z[n]), .valid(avalid[n])
    );
    // sector = round(A / 22.5) mod 8, A = -z in 1/16 degree (22.5 deg = 360)
    logic signed [ZW+1:0] shifted;
    assign shifted = -(ZW+2)'(z[n]) + (ZW+2)'(180 + 8 * 360);
    assign sect[n] = 3'((int'(shifted) / 360) % 8);
  end

  main_angle_decision #(.VOTE_TH(VOTE_TH)) u_main (
    .sect(sect), .valid(avalid), .dom(dom), .dom_count(dom_count), .dom_ok(dom_ok)
  );

endmodule
