// maxpool_unit: N_CH max-pool sub-modules working in lock step, one per
// convolution channel. All channels receive their pixels in the same cycles,
// so one valid strobe serves them all; the pooled 8-channel word appears one
// clock after every fourth input pixel.
module maxpool_unit
  import cnn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  act_t in  [N_CH],
  output act_t out [N_CH],
  output logic out_valid
);

  logic [N_CH-1:0] v;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    maxpool_sub u_sub (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .in       (in[c]),
      .out      (out[c]),
      .out_valid(v[c])
    );
  end

  assign out_valid = v[0];

endmodule
