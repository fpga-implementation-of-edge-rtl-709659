// Clock-domain crossing for single-clock pulses.
//
// A pulse in the source domain flips a toggle flip-flop; the toggle is
// passed through two flip-flops in the destination domain and an edge of it
// becomes a one-clock pulse there. Pulses must be further apart than about
// three destination clocks. A helper of the scaler's top level, which joins
// the video, processing and LCD clocks.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);

  logic tog;
  logic [2:0] sync;

  always_ff @(posedge src_clk or negedge src_rst_n)
    if (!src_rst_n)     tog <= 1'b0;
    else if (src_pulse) tog <= !tog;

  always_ff @(posedge dst_clk or negedge dst_rst_n)
    if (!dst_rst_n) sync <= '0;
    else            sync <= {sync[1:0], tog};

  assign dst_pulse = sync[2] ^ sync[1];

endmodule
