// cmac: convolution multiply-accumulate unit of one channel.
//
// Three signed 8x8 multipliers and two adders: it forms the dot product of one
// kernel row (three weights) with three pixels from the pixel registers, i.e.
// one of the three partial sums that make up a 3x3 output pixel. Lane j of
// each 24-bit input is bits [8j+7:8j]. Purely combinational; the 18-bit result
// width is the one the original datapath uses and holds any sum of three
// 16-bit products.
module cmac
  import cnn_pkg::*;
(
  input  row3_t                     pix,
  input  row3_t                     wgt,
  output logic signed [CMAC_W-1:0]  sum
);

  logic signed [2*PIX_W-1:0] prod [3];

  always_comb begin
    for (int j = 0; j < 3; j++)
      prod[j] = pix_t'(pix[j*PIX_W +: PIX_W]) * wgt_t'(wgt[j*WGT_W +: WGT_W]);
    sum = CMAC_W'(prod[0]) + CMAC_W'(prod[1]) + CMAC_W'(prod[2]);
  end

endmodule
