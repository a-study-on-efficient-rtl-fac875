// dense_unit: the fully connected layer, 1352 inputs to 10 neurons.
//
// Ten weight banks (one dense_mem_wrapper of 1408x8 each, one bank per output
// neuron) feed ten MACs; the dense controller broadcasts one max-pooled pixel
// per cycle to all MACs, so each cycle performs ten multiply-accumulates.
// When all 1352 pixels are in, each MAC's register is truncated to 16 bits,
// the neuron's bias is added, and out_valid pulses with the ten results.
// Bank b is connected only to MAC b. During weight loading (dw_we) only the
// addressed bank is selected and written; during inference all ten banks are
// read in parallel at the same address. Loading and inference are not expected
// at the same time; loading has priority.
module dense_unit
  import cnn_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pool_valid,
  input  act_t               pool [N_CH],
  // weight and bias loading
  input  logic               dw_we,
  input  logic [3:0]         dw_bank,
  input  logic [BANK_AW-1:0] dw_addr,
  input  logic [WGT_W-1:0]   dw_data,
  input  logic [N_OUT-1:0]   db_we,
  input  bias_t              db_data,
  // results
  output act_t               out [N_OUT],
  output logic               out_valid,
  output logic               busy
);

  logic               mem_rd;
  logic [BANK_AW-1:0] mem_addr;
  logic               mac_en, mac_first;
  act_t               mac_px;

  dense_controller u_ctrl (
    .clk, .rst_n, .pool_valid, .pool,
    .mem_rd, .mem_addr, .mac_en, .mac_first, .mac_px,
    .neurons_valid(out_valid), .busy
  );

  for (genvar n = 0; n < N_OUT; n++) begin : g_neuron
    logic [WGT_W-1:0] wgt;
    act_t             acc16;

    dense_mem_wrapper u_bank (
      .clk, .rst_n,
      .cs  (dw_we ? (dw_bank == 4'(n)) : mem_rd),
      .we  (dw_we),
      .addr(dw_we ? dw_addr : mem_addr),
      .din (dw_data),
      .dout(wgt)
    );

    mac u_mac (
      .clk, .rst_n, .en(mac_en), .first(mac_first),
      .px(mac_px), .w(wgt_t'(wgt)), .out(acc16)
    );

    bias_adder u_bias (
      .clk, .rst_n, .bias_we(db_we[n]), .bias_wdata(db_data),
      .in(acc16), .out(out[n])
    );
  end

endmodule
