// tb_cnn_accel: the accelerator without the bus interface. Streams a random
// network's weights and three random images (one with a pixel gap pattern)
// through the valid/ready ports and checks each digit and neuron value against
// the reference model; also checks busy around weight loading and
// convolution, that pixels are refused while busy, and that each image's
// convolution takes 3822 cycles of busy.
`define WATCHDOG_CYCLES 400000
module tb_cnn_accel;
`include "tb_util.svh"
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  logic rst_n = 0, wgt_valid = 0, pix_valid = 0; logic [15:0] wgt_data = '0; logic [7:0] pix_data = '0;
  logic wgt_ready, pix_ready, busy, weights_loaded, result_valid; logic [3:0] result_idx; act_t result_val;
  cnn_accel dut (.clk, .rst_n, .wgt_valid, .wgt_data, .wgt_ready, .pix_valid, .pix_data, .pix_ready,
                 .busy, .weights_loaded, .result_valid, .result_idx, .result_val);
  cw_t cw; cb_t cb; dw_t dw; db_t db; img_t img [3];
  int exp_idx [3]; act_t exp_val [3];
  int n_res = 0, busy_cycles = 0;
  always @(posedge clk) if (rst_n && weights_loaded && busy) busy_cycles++;
  always @(posedge clk) if (rst_n && result_valid) begin
    if (n_res < 3) begin
      check(result_idx == 4'(exp_idx[n_res]), $sformatf("image %0d digit %0d vs %0d", n_res, result_idx, exp_idx[n_res]));
      check(result_val == exp_val[n_res], $sformatf("image %0d value %0d vs %0d", n_res, result_val, exp_val[n_res]));
    end
    n_res++;
  end
  task automatic send_w(input logic [15:0] d);
    @(negedge clk); wgt_valid = 1; wgt_data = d;
    #1; while (!wgt_ready) begin @(negedge clk); #1; end
    @(negedge clk); wgt_valid = 0;
  endtask
  initial begin
    for (int c = 0; c < N_CH; c++) begin
      for (int i = 0; i < 9; i++) cw[c][i] = 8'($urandom);
      cb[c] = 16'($signed($urandom_range(0, 2047)) - 1024);
    end
    for (int n = 0; n < N_OUT; n++) begin
      for (int k = 0; k < DENSE_IN; k++) dw[n][k] = 8'($signed($urandom_range(0, 31)) - 16);
      db[n] = 16'($signed($urandom_range(0, 511)) - 256);
    end
    for (int m = 0; m < 3; m++) begin
      for (int y = 0; y < IMG; y++) for (int x = 0; x < IMG; x++) img[m][y][x] = 8'($urandom_range(0, 127));
      begin
        automatic neu_t nv = ref_dense(ref_pool(ref_conv(img[m], cw, cb)), dw, db);
        exp_idx[m] = ref_argmax(nv); exp_val[m] = nv[exp_idx[m]];
      end
    end
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); check(busy && !pix_ready, "busy after reset");
    for (int c = 0; c < N_CH; c++) for (int i = 0; i < 9; i++) send_w(16'(cw[c][i]));
    for (int c = 0; c < N_CH; c++) send_w(cb[c]);
    for (int n = 0; n < N_OUT; n++) for (int k = 0; k < DENSE_IN; k++) send_w(16'(dw[n][k]));
    check(busy, "busy until the last weight");
    for (int n = 0; n < N_OUT; n++) send_w(db[n]);
    @(negedge clk);
    check(weights_loaded && !busy && !wgt_ready, "idle after weights");
    for (int m = 0; m < 3; m++) begin
      while (busy) @(negedge clk);
      for (int i = 0; i < N_PIX; i++) begin
        @(negedge clk); pix_valid = 1; pix_data = img[m][i / IMG][i % IMG];
        #1; check(pix_ready, "pixel accepted while idle");
        if (m == 1 && i % 3 == 0) begin @(negedge clk); pix_valid = 0; end
      end
      @(negedge clk); pix_valid = 0;
      check(busy && !pix_ready, "busy during convolution, pixels refused");
    end
    while (n_res < 3) @(negedge clk);
    repeat (30) @(negedge clk);
    check(n_res == 3, "three results");
    // plus one cycle: busy drops the clock after the last weight is taken
    check(busy_cycles == 3 * 3823 + 1, $sformatf("%0d busy cycles for three convolutions", busy_cycles));
    finish_tb();
  end
endmodule
