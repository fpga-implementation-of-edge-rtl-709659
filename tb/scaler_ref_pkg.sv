// Reference models used by the testbenches of the scaler. They restate the
// algorithm in plain integer and real arithmetic, independently of the RTL:
// Sobel gradients, the orientation sector from the real arctangent, the
// fuzzy decision with its fixed thresholds, and the bilinear and weighted
// interpolation formulas.
package scaler_ref_pkg;
  import scaler_pkg::*;

  // O(i,j) = win[j+1][i+1]; i column, j row, both -1..4
  function automatic int o(win6_t w, int i, int j);
    return int'(w[j+1][i+1]);
  endfunction

  function automatic void sobel(win6_t w, int i, int j, output int dx, output int dy);
    dx = o(w,i-1,j-1) + 2*o(w,i-1,j) + o(w,i-1,j+1) - (o(w,i+1,j-1) + 2*o(w,i+1,j) + o(w,i+1,j+1));
    dy = o(w,i-1,j-1) + 2*o(w,i,j-1) + o(w,i+1,j-1) - (o(w,i-1,j+1) + 2*o(w,i,j+1) + o(w,i+1,j+1));
  endfunction

  // Sector of A = -atan2(dy,dx) in degrees, rounded to 22.5 degrees, mod 8.
  // `margin` is the distance in degrees to the nearest sector boundary.
  function automatic int ref_sector(int dx, int dy, output real margin);
    real a, q, frac;
    int  k;
    a = -$atan2(real'(dy), real'(dx)) * 180.0 / 3.14159265358979;
    q = a / 22.5;
    k = $rtoi($floor(q + 0.5));
    frac = q + 0.5 - $floor(q + 0.5);        // 0..1 inside the sector
    margin = 22.5 * ((frac < 0.5) ? frac : 1.0 - frac);
    return ((k % 8) + 8) % 8;
  endfunction

  // Fuzzy decision: 1 = edge-adaptive (AA), 0 = bilinear.
  function automatic bit fuzzy_aa(win6_t w, int vis_th, int cd_th,
                                  output bit vd, output bit sd_big, output int cd);
    int mx, mn, sum, mean, num, b[6][6], g;
    mx = 0; mn = 255; sum = 0;
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 4; i++) begin
        if (o(w,i,j) > mx) mx = o(w,i,j);
        if (o(w,i,j) < mn) mn = o(w,i,j);
        sum += o(w,i,j);
      end
    mean   = sum / 16;
    vd     = (mx - mn) > vis_th;
    num    = mx + mn - 2 * mean;
    if (num < 0) num = -num;
    sd_big = !(((mx - mn) / 2) > num);
    for (int r = 0; r < 6; r++)
      for (int c = 0; c < 6; c++) b[r][c] = (int'(w[r][c]) >= mean) ? 1 : 0;
    cd = 0;
    for (int r = 1; r < 5; r++)
      for (int c = 1; c < 5; c++) begin
        g = 4 * b[r][c] - b[r-1][c] - b[r+1][c] - b[r][c-1] - b[r][c+1];
        cd += (g < 0) ? -g : g;
      end
    return vd && !sd_big && (cd <= cd_th);
  endfunction

  function automatic int bilinear(win6_t w, int k);
    case (k)
      0:       return (o(w,1,1) + o(w,2,1)) / 2;
      1:       return (o(w,1,1) + o(w,1,2)) / 2;
      default: return (o(w,1,1) + o(w,2,1) + o(w,1,2) + o(w,2,2)) / 4;
    endcase
  endfunction

  // weighted sum with weights in 1/256, floor, clipped
  function automatic int weighted(win6_t w, int wt[16]);
    int acc, r;
    acc = 0;
    for (int t = 0; t < 16; t++) acc += o(w, t % 4, t / 4) * wt[t];
    r = (acc >= 0) ? acc / 256 : -((-acc + 255) / 256);
    if (r < 0) r = 0;
    if (r > 255) r = 255;
    return r;
  endfunction

endpackage
