// Weight table of the edge-adaptive interpolator.
//
// Holds W(theta, m, n)(i, j): for each of the 8 orientation sectors and each
// of the 3 new pixels P(1,0), P(0,-1), P(1,-1), a 4x4 matrix of weights, 384
// weights in all, each a signed number with a resolution of 1/256. The
// table read is combinational: the dominant sector selects the 48 weights
// used for the current block.
//
// The described design fills this table with weights trained off-line by a
// back-propagation neural network, but does not list them. Here the table is
// therefore a register file with a write port, loaded by the host after
// reset. Its reset content (this design's choice) is the bilinear kernel for
// every sector (1/2, 1/2 on the two horizontal or vertical neighbours and
// 1/4 on the four diagonal ones), so an unloaded table interpolates exactly
// like the bilinear module.
//
// Write address: {sector[2:0], position[1:0], tap[3:0]}, tap = 4*j + i for
// O(i,j); position 3 is ignored. Writes take effect at the next clock.
module weight_table
  import scaler_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [8:0] waddr,
  input  weight_t    wdata,
  input  logic [2:0] sector,
  output weight_t    w [NPOS][16]
);

  weight_t tab [NSECT][NPOS][16];

  function automatic weight_t reset_weight(input int pos, input int tap);
    case (pos)
      0:       return (tap == 5 || tap == 6) ? weight_t'(128) : weight_t'(0);
      1:       return (tap == 5 || tap == 9) ? weight_t'(128) : weight_t'(0);
      default: return (tap == 5 || tap == 6 || tap == 9 || tap == 10) ? weight_t'(64) : weight_t'(0);
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NSECT; k++)
        for (int p = 0; p < NPOS; p++)
          for (int t = 0; t < 16; t++)
            tab[k][p][t] <= reset_weight(p, t);
    end else if (we && waddr[5:4] != 2'd3) begin
      tab[waddr[8:6]][waddr[5:4]][waddr[3:0]] <= wdata;
    end
  end

  always_comb begin
    for (int p = 0; p < NPOS; p++)
      for (int t = 0; t < 16; t++)
        w[p][t] = tab[sector][p][t];
  end

endmodule
