// cnn_axi_top: the CNN accelerator as a SoC peripheral, an AXI4-Lite slave
// (32-bit data) in front of the accelerator.
//
// The processor loads the weights once through DATA_IN (CONTROL = 0), then
// for each image sets CONTROL = 1 and writes the 784 pixels, polling
// WRITE_STATUS between writes; it waits for BUSY_STATUS = 0 before the next
// image and picks up results through RESULT_STATUS and RESULT. See
// axi_lite_if for the register map and cnn_accel for the data path.
module cnn_axi_top
  import cnn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [4:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  output logic        busy
);

  logic        wgt_valid, wgt_ready, pix_valid, pix_ready;
  logic [15:0] wgt_data;
  logic [7:0]  pix_data;
  logic        weights_loaded, result_valid;
  logic [3:0]  result_idx;
  act_t        result_val;

  axi_lite_if u_axi (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready, .s_axi_wdata, .s_axi_wstrb,
    .s_axi_wvalid, .s_axi_wready, .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready, .s_axi_rdata, .s_axi_rresp,
    .s_axi_rvalid, .s_axi_rready,
    .wgt_valid, .wgt_data, .wgt_ready, .pix_valid, .pix_data, .pix_ready,
    .busy, .result_valid, .result_idx, .result_val
  );

  cnn_accel u_accel (
    .clk, .rst_n,
    .wgt_valid, .wgt_data, .wgt_ready, .pix_valid, .pix_data, .pix_ready,
    .busy, .weights_loaded, .result_valid, .result_idx, .result_val
  );

endmodule
