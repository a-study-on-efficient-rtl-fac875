// bias_adder: a bias register placed next to the adder that uses it.
//
// The bias is written once while the weights are loaded (bias_we) and is then
// added to every word passing through. The addition is combinational, so a
// unit that registers its output after the bias adder and the following ReLU
// completes both in one clock, as the convolution unit does. The sum wraps at
// 16 bits; the design does not say whether it saturates, and wrapping is this
// design's choice. Reset clears the bias.
module bias_adder
  import cnn_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  bias_we,
  input  bias_t bias_wdata,
  input  act_t  in,
  output act_t  out
);

  bias_t bias_q;

  always_ff @(posedge clk) begin
    if (!rst_n)       bias_q <= '0;
    else if (bias_we) bias_q <= bias_wdata;
  end

  assign out = in + bias_q;

endmodule
