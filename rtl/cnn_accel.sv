// cnn_accel: MNIST digit classifier, one 28x28 8-bit image in, one digit out.
//
// Data flow: input loader -> input memory -> convolution unit (3x3x8 conv,
// bias, ReLU) -> max-pooling unit (2x2) -> dense unit (1352 -> 10) -> max
// finder. No intermediate feature map is stored: the convolution produces the
// four pixels of each pooling window back to back, the pooled word goes
// straight into the dense unit's eight-entry buffer, and the dense unit
// accumulates all ten neurons as pixels arrive. The weight loader distributes
// the weights (see weight_loader for the order) and the main controller
// drives busy.
//
// Interface: a weight stream (wgt_valid/wgt_ready, 16 bits) and a pixel
// stream (pix_valid/pix_ready, 8 bits, raster order); a transfer happens when
// valid and ready are both high. busy is high from reset until all weights
// are loaded and from the last pixel of an image until its convolution is
// done; pix_ready is its inverse. The result (digit and its neuron value)
// comes with result_valid about 25 cycles after the convolution finishes; the
// next image may already be loading then.
module cnn_accel
  import cnn_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wgt_valid,
  input  logic [15:0]      wgt_data,
  output logic             wgt_ready,
  input  logic             pix_valid,
  input  logic [PIX_W-1:0] pix_data,
  output logic             pix_ready,
  output logic             busy,
  output logic             weights_loaded,
  output logic             result_valid,
  output logic [3:0]       result_idx,
  output act_t             result_val
);

  // weight loader outputs
  logic               cw_we, dw_we;
  logic [2:0]         cw_bank;
  logic [3:0]         cw_idx, dw_bank;
  logic [BANK_AW-1:0] dw_addr;
  logic [N_CH-1:0]    cb_we;
  logic [N_OUT-1:0]   db_we;
  logic [WGT_W-1:0]   w_data;
  bias_t              b_data;

  // image path
  logic               accept_pixels, image_loaded, conv_done;
  logic               im_wr_en, im_rd_en;
  logic [9:0]         im_wr_addr;
  logic [PIX_W-1:0]   im_wr_data, im_rd_data;
  logic [4:0]         im_rd_row, im_rd_col;
  act_t               conv_px [N_CH];
  logic               conv_valid, conv_busy;
  act_t               pool_px [N_CH];
  logic               pool_valid;
  act_t               neurons [N_OUT];
  logic               neurons_valid, dense_busy, mf_busy;

  weight_loader u_wload (
    .clk, .rst_n, .in_valid(wgt_valid), .in_data(wgt_data), .in_ready(wgt_ready),
    .cw_we, .cw_bank, .cw_idx, .cb_we, .dw_we, .dw_bank, .dw_addr, .db_we,
    .w_data, .b_data, .loaded(weights_loaded)
  );

  main_controller u_main (
    .clk, .rst_n, .weights_loaded, .image_loaded, .conv_done,
    .busy, .accept_pixels
  );

  input_loader u_iload (
    .clk, .rst_n, .enable(accept_pixels), .in_valid(pix_valid), .in_data(pix_data),
    .in_ready(pix_ready), .wr_en(im_wr_en), .wr_addr(im_wr_addr), .wr_data(im_wr_data),
    .image_loaded
  );

  input_memory u_imem (
    .clk, .wr_en(im_wr_en), .wr_addr(im_wr_addr), .wr_data(im_wr_data),
    .rd_en(im_rd_en), .rd_row(im_rd_row), .rd_col(im_rd_col), .rd_data(im_rd_data)
  );

  conv_unit u_conv (
    .clk, .rst_n, .start(image_loaded),
    .rd_en(im_rd_en), .rd_row(im_rd_row), .rd_col(im_rd_col), .rd_data(im_rd_data),
    .cw_we, .cw_bank, .cw_idx, .cw_data(w_data), .cb_we, .cb_data(b_data),
    .out(conv_px), .out_valid(conv_valid), .busy(conv_busy), .done(conv_done)
  );

  maxpool_unit u_pool (
    .clk, .rst_n, .in_valid(conv_valid), .in(conv_px), .out(pool_px), .out_valid(pool_valid)
  );

  dense_unit u_dense (
    .clk, .rst_n, .pool_valid, .pool(pool_px),
    .dw_we, .dw_bank, .dw_addr, .dw_data(w_data), .db_we, .db_data(b_data),
    .out(neurons), .out_valid(neurons_valid), .busy(dense_busy)
  );

  max_finder u_mf (
    .clk, .rst_n, .in_valid(neurons_valid), .in(neurons), .busy(mf_busy),
    .out_idx(result_idx), .out_val(result_val), .out_valid(result_valid)
  );

endmodule
