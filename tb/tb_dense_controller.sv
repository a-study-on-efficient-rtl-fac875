// tb_dense_controller: sends the 169 pooled words of one image (8 random
// channels each, 12-20 cycles apart, as the convolution produces them). It
// models the weight banks as "weight = address" with one-cycle latency and
// checks that every MAC cycle pairs pixel k of the flattened vector with the
// weight read at address k, that mac_first marks only k = 0, that the MACs
// run 1352 times and that neurons_valid pulses once, one clock after the last
// MAC cycle. A second image checks that the address restarts at 0.
`define WATCHDOG_CYCLES 20000
module tb_dense_controller;
`include "tb_util.svh"
  import cnn_pkg::*;
  logic rst_n = 0, pool_valid = 0, mem_rd, mac_en, mac_first, neurons_valid, busy;
  act_t pool [N_CH]; logic [10:0] mem_addr, rd_q = '0; act_t mac_px;
  act_t flat [DENSE_IN];
  dense_controller dut (.clk, .rst_n, .pool_valid, .pool, .mem_rd, .mem_addr,
                        .mac_en, .mac_first, .mac_px, .neurons_valid, .busy);
  always @(posedge clk) if (mem_rd) rd_q <= mem_addr;   // bank model: data = address

  int k = 0, n_nv = 0; bit last_mac = 0, nv_late = 0;
  always @(posedge clk) if (rst_n) begin
    if (neurons_valid) begin n_nv++; if (!last_mac) nv_late = 1; end
    last_mac = 0;
    if (mac_en) begin
      check(k < DENSE_IN && rd_q == 11'(k) && mac_px == flat[k] && mac_first == (k == 0),
            $sformatf("mac %0d: addr %0d px %0d", k, rd_q, mac_px));
      last_mac = (k == DENSE_IN - 1);
      k++;
    end
  end

  initial begin
    for (int c = 0; c < N_CH; c++) pool[c] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int im = 0; im < 2; im++) begin
      k = 0;
      for (int i = 0; i < DENSE_IN; i++) flat[i] = act_t'($urandom);
      for (int w = 0; w < DENSE_IN / N_CH; w++) begin
        @(negedge clk); pool_valid = 1;
        for (int c = 0; c < N_CH; c++) pool[c] = flat[w*N_CH + c];
        @(negedge clk); pool_valid = 0;
        repeat ($urandom_range(10, 18)) @(negedge clk);
      end
      repeat (5) @(negedge clk);
      check(k == DENSE_IN, $sformatf("image %0d: %0d MAC cycles", im, k));
      check(n_nv == im + 1 && !nv_late, "neurons_valid once, right after the last MAC");
    end
    finish_tb();
  end
endmodule
