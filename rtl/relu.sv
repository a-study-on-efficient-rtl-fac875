// relu: rectified linear unit, out = max(0, in) on a signed 16-bit word.
// Combinational; the convolution unit registers its output.
module relu
  import cnn_pkg::*;
(
  input  act_t in,
  output act_t out
);

  assign out = in[ACT_W-1] ? '0 : in;

endmodule
