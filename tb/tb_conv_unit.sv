// tb_conv_unit: loads random filters and biases, runs a random image from a
// behavioural input memory and compares every output word (8 channels) with
// the reference convolution + bias + ReLU, in pooling order (top/bottom of a
// column, then the next column, strip by strip). Also checks that the two
// outputs of a column are three cycles apart (three CMAC cycles per pixel).
`define WATCHDOG_CYCLES 20000
module tb_conv_unit;
`include "tb_util.svh"
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  logic rst_n = 0, start = 0, rd_en, cw_we = 0, out_valid, busy, done;
  logic [4:0] rd_row, rd_col; logic [7:0] rd_data = '0;
  logic [2:0] cw_bank = '0; logic [3:0] cw_idx = '0; logic [7:0] cw_data = '0;
  logic [7:0] cb_we = '0; bias_t cb_data = '0; act_t out [N_CH];
  img_t img; cw_t cw; cb_t cb; conv_t expv;
  conv_unit dut (.clk, .rst_n, .start, .rd_en, .rd_row, .rd_col, .rd_data,
                 .cw_we, .cw_bank, .cw_idx, .cw_data, .cb_we, .cb_data,
                 .out, .out_valid, .busy, .done);
  always @(posedge clk) if (rd_en) rd_data <= img[rd_row][rd_col];

  int n_out = 0, last_t = 0, t = 0;
  always @(posedge clk) begin
    t++;
    if (rst_n && out_valid) begin
      automatic int s = n_out / 52, c = (n_out % 52) / 2, sub = n_out % 2;
      for (int ch = 0; ch < N_CH; ch++)
        check(out[ch] == expv[ch][2*s+sub][c],
              $sformatf("out %0d ch %0d: %0d vs %0d", n_out, ch, out[ch], expv[ch][2*s+sub][c]));
      if (sub == 1) check(t - last_t == 3, $sformatf("out %0d: %0d cycles after the top output", n_out, t - last_t));
      last_t = t;
      n_out++;
    end
  end

  initial begin
    for (int y = 0; y < IMG; y++) for (int x = 0; x < IMG; x++) img[y][x] = 8'($urandom_range(0, 127));
    for (int c = 0; c < N_CH; c++) begin
      for (int i = 0; i < 9; i++) cw[c][i] = 8'($urandom);
      cb[c] = 16'($signed($urandom_range(0, 4095)) - 2048);
    end
    expv = ref_conv(img, cw, cb);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 0; c < N_CH; c++) for (int i = 0; i < 9; i++) begin
      @(negedge clk); cw_we = 1; cw_bank = 3'(c); cw_idx = 4'(i); cw_data = cw[c][i];
    end
    @(negedge clk); cw_we = 0;
    for (int c = 0; c < N_CH; c++) begin
      @(negedge clk); cb_we = 8'(1 << c); cb_data = cb[c];
    end
    @(negedge clk); cb_we = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (done);
    repeat (5) @(negedge clk);
    check(n_out == CONV_OUT * CONV_OUT, $sformatf("%0d output words", n_out));
    finish_tb();
  end
endmodule
