// Two-flip-flop synchroniser for a slowly changing level signal.
// A helper of the scaler's top level for status bits crossing clock domains.
module level_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic [1:0] s;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s <= '0;
    else        s <= {s[0], d};

  assign q = s[1];

endmodule
