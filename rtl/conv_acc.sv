// conv_acc: the intermediate-result register and adder of one convolution
// channel ("Register & Adder" in the convolution datapath).
//
// An output pixel takes three cycles, one per kernel row. On the first cycle
// (first=1) the CMAC sum is loaded, on the next two it is added to the
// register. On the third (last=1) the complete 20-bit sum is truncated to 16
// bits (CONV_SHIFT fraction bits dropped, the rest wrapped) and presented on
// out with out_valid high for one cycle, one clock after the last partial sum.
module conv_acc
  import cnn_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      first,
  input  logic                      last,
  input  logic signed [CMAC_W-1:0]  in,
  output act_t                      out,
  output logic                      out_valid
);

  logic signed [CONV_ACC_W-1:0] acc_q, sum;

  assign sum = (first ? '0 : acc_q) + CONV_ACC_W'(in);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q     <= '0;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en && last;
      if (en) acc_q <= sum;
      if (en && last) out <= trunc16(64'(sum), CONV_SHIFT);
    end
  end

endmodule
