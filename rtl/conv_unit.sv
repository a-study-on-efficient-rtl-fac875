// conv_unit: the convolution layer with bias and ReLU, all eight channels in
// parallel.
//
// The convolution controller selects one 24-bit row of three pixels per cycle
// and the weight memory supplies the matching kernel row of every filter; each
// channel's CMAC multiplies the three pairs and its accumulator (conv_acc)
// sums three such rows into one 16-bit output pixel. The bias adder and ReLU
// of each channel then act in one further clock. Output pixels leave in
// max-pooling order (see conv_controller), one 8-channel word every three
// cycles while computing; out_valid marks them. Latency from the last CMAC
// cycle of a pixel to out_valid: two clocks. Weights and biases are written
// through the load ports before any image is processed.
module conv_unit
  import cnn_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  // input memory read port
  output logic             rd_en,
  output logic [4:0]       rd_row,
  output logic [4:0]       rd_col,
  input  logic [PIX_W-1:0] rd_data,
  // weight and bias loading
  input  logic             cw_we,
  input  logic [2:0]       cw_bank,
  input  logic [3:0]       cw_idx,
  input  logic [WGT_W-1:0] cw_data,
  input  logic [N_CH-1:0]  cb_we,
  input  bias_t            cb_data,
  // results
  output act_t             out [N_CH],
  output logic             out_valid,
  output logic             busy,
  output logic             done
);

  logic [1:0] wgt_row;
  row3_t      pix_row;
  row3_t      wrow [N_CH];
  logic       mac_en, mac_first, mac_last;
  logic [N_CH-1:0] acc_valid;

  conv_controller u_ctrl (
    .clk, .rst_n, .start,
    .rd_en, .rd_row, .rd_col, .rd_data,
    .wgt_row, .pix_row, .mac_en, .mac_first, .mac_last,
    .busy, .done
  );

  conv_weight_mem u_wmem (
    .clk, .rst_n,
    .wr_en(cw_we), .wr_bank(cw_bank), .wr_idx(cw_idx), .wr_data(cw_data),
    .rd_row(wgt_row), .rd_data(wrow)
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic signed [CMAC_W-1:0] psum;
    act_t conv_px, biased, activated;

    cmac u_cmac (.pix(pix_row), .wgt(wrow[c]), .sum(psum));

    conv_acc u_acc (
      .clk, .rst_n, .en(mac_en), .first(mac_first), .last(mac_last),
      .in(psum), .out(conv_px), .out_valid(acc_valid[c])
    );

    bias_adder u_bias (
      .clk, .rst_n, .bias_we(cb_we[c]), .bias_wdata(cb_data),
      .in(conv_px), .out(biased)
    );

    relu u_relu (.in(biased), .out(activated));

    always_ff @(posedge clk) begin
      if (!rst_n)            out[c] <= '0;
      else if (acc_valid[c]) out[c] <= activated;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= acc_valid[0];
  end

endmodule
