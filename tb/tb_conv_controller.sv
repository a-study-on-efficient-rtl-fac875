// tb_conv_controller: runs one image through the controller with a
// behavioural one-cycle-latency image memory. For every compute cycle it
// checks that the selected pixel register holds image row 2s+sub+krow,
// columns c..c+2 (s = strip, c = output column, sub = top/bottom output), that
// the weight row is krow and that first/last mark kernel rows 0 and 2, with
// the outputs in pooling order. It also checks the number of memory reads
// (13 strips x (12 + 25 x 4) = 1456), the 3822-cycle duration, and that done
// pulses once.
`define WATCHDOG_CYCLES 20000
module tb_conv_controller;
`include "tb_util.svh"
  import cnn_pkg::*;
  logic rst_n = 0, start = 0, rd_en, mac_en, mac_first, mac_last, busy, done;
  logic [4:0] rd_row, rd_col; logic [7:0] rd_data = '0; logic [1:0] wgt_row; row3_t pix_row;
  logic [7:0] img [IMG][IMG];
  conv_controller dut (.clk, .rst_n, .start, .rd_en, .rd_row, .rd_col, .rd_data,
                       .wgt_row, .pix_row, .mac_en, .mac_first, .mac_last, .busy, .done);
  always @(posedge clk) if (rd_en) rd_data <= img[rd_row][rd_col];

  int n_reads = 0, n_mac = 0, n_done = 0, cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if (busy) cycles++;
    if (rd_en) n_reads++;
    if (done) n_done++;
    if (mac_en) begin
      automatic int out_idx = n_mac / 3, krow = n_mac % 3;
      automatic int s = out_idx / 52, c = (out_idx % 52) / 2, sub = out_idx % 2;
      automatic int r = 2*s + sub + krow;
      automatic row3_t exp_row = {img[r][c+2], img[r][c+1], img[r][c]};
      check(pix_row == exp_row && wgt_row == 2'(krow) && mac_first == (krow == 0) && mac_last == (krow == 2),
            $sformatf("mac cycle %0d (s%0d c%0d sub%0d k%0d): %h vs %h", n_mac, s, c, sub, krow, pix_row, exp_row));
      n_mac++;
    end
  end

  initial begin
    for (int y = 0; y < IMG; y++) for (int x = 0; x < IMG; x++) img[y][x] = 8'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (n_done == 1);
    repeat (5) @(negedge clk);
    check(n_mac == 3 * CONV_OUT * CONV_OUT, $sformatf("%0d CMAC cycles", n_mac));
    check(n_reads == 1456, $sformatf("%0d memory reads", n_reads));
    check(cycles == 3822, $sformatf("%0d busy cycles", cycles));
    check(n_done == 1 && !busy, "done once, then idle");
    finish_tb();
  end
endmodule
