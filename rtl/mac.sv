// mac: one dense-layer multiply-accumulate unit with its intermediate-result
// register.
//
// Each enabled cycle multiplies a 16-bit max-pooled pixel by an 8-bit weight
// (signed 16x8 multiplier) and adds the product to the register; first=1
// starts a new sum instead. The register is DENSE_ACC_W = 35 bits, enough for
// 1352 full-scale products. out is the register truncated to 16 bits
// (DENSE_SHIFT fraction bits dropped), read once all inputs are in.
module mac
  import cnn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic first,
  input  act_t px,
  input  wgt_t w,
  output act_t out
);

  logic signed [DENSE_ACC_W-1:0]    acc_q;
  logic signed [ACT_W+WGT_W-1:0]    prod;

  assign prod = px * w;

  always_ff @(posedge clk) begin
    if (!rst_n)  acc_q <= '0;
    else if (en) acc_q <= (first ? '0 : acc_q) + DENSE_ACC_W'(prod);
  end

  assign out = trunc16(64'(acc_q), DENSE_SHIFT);

endmodule
