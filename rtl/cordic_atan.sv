// CORDIC arctangent (vectoring mode) for the Sobel gradient of one pixel.
//
// Computes the angle of the vector (Dx, Dy) without a division or a large
// table. A first step places the vector in the right half-plane, as in the
// described z0 table: Dx >= 0 gives z0 = 0; Dx < 0 and Dy >= 0 rotates by
// -90 degrees with z0 = +90; Dx < 0 and Dy < 0 rotates by +90 degrees with
// z0 = -90. Then five shift-and-add iterations follow
//   d_i = +1 if y_i < 0, else -1
//   x_{i+1} = x_i - d_i y_i 2^-i,  y_{i+1} = y_i + d_i x_i 2^-i,
//   z_{i+1} = z_i - d_i atan(2^-i)
// which drive y towards zero, so z_5 = z0 + atan(y0/x0), the angle of the
// vector in (-180, 180] degrees. Five iterations give the 11.25-degree
// accuracy that the eight 22.5-degree orientation sectors need.
// The gain K of the rotations is not compensated, since only z is used.
//
// Number formats (this design's choice): x and y carry FRAC = 4 fractional
// bits so that the shifted terms keep precision; z is in units of 1/16
// degree (atan table 720, 425, 225, 114, 57 = 45, 26.57, 14.04, 7.13, 3.58
// degrees). `valid` is low when Dx = Dy = 0, an angle that has no meaning.
// Purely combinational: the whole interpolation circuit settles within a
// fixed number of clocks given to it by the data-flow controller.
module cordic_atan #(
  parameter int IN_W  = 11,   // signed Sobel gradient width
  parameter int ITER  = 5,
  parameter int FRAC  = 4,
  parameter int Z_W   = 13    // signed angle, 1/16 degree
) (
  input  logic signed [IN_W-1:0] dx,
  input  logic signed [IN_W-1:0] dy,
  output logic signed [Z_W-1:0]  angle,
  output logic                   valid
);

  localparam int XW = IN_W + FRAC + 3;

  // atan(2^-i) in 1/16 degree.
  function automatic logic signed [Z_W-1:0] atan_tab(input int i);
    case (i)
      0: return Z_W'(720);
      1: return Z_W'(425);
      2: return Z_W'(225);
      3: return Z_W'(114);
      4: return Z_W'(57);
      5: return Z_W'(29);
      6: return Z_W'(14);
      7: return Z_W'(7);
      default: return Z_W'(4);
    endcase
  endfunction

  logic signed [XW-1:0]  x, y, xs, ys;
  logic signed [Z_W-1:0] z;

  always_comb begin
    logic signed [XW-1:0] ex, ey;
    ex = XW'(dx) <<< FRAC;
    ey = XW'(dy) <<< FRAC;
    if (dx >= 0) begin
      x = ex;  y = ey;  z = '0;
    end else if (dy >= 0) begin
      x = ey;  y = -ex; z = Z_W'(90 * 16);
    end else begin
      x = -ey; y = ex;  z = -Z_W'(90 * 16);
    end
    for (int i = 0; i < ITER; i++) begin
      xs = x >>> i;
      ys = y >>> i;
      if (y < 0) begin
        x = x - ys;
        y = y + xs;
        z = z - atan_tab(i);
      end else begin
        x = x + ys;
        y = y - xs;
        z = z + atan_tab(i);
      end
    end
    angle = z;
    valid = (dx != 0) || (dy != 0);
  end

endmodule
