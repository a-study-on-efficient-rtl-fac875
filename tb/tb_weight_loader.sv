// tb_weight_loader: streams all 13610 weights with random gaps and records
// every write strobe the loader produces; checks that each weight went to the
// right place (conv bank/index, conv bias channel, dense bank/address, dense
// bias neuron), that exactly one strobe fires per weight, and that loaded
// rises only after the last weight and in_ready then falls.
`define WATCHDOG_CYCLES 100000
module tb_weight_loader;
`include "tb_util.svh"
  import cnn_pkg::*;
  logic rst_n = 0, in_valid = 0; logic [15:0] in_data = '0; logic in_ready;
  logic cw_we, dw_we, loaded; logic [2:0] cw_bank; logic [3:0] cw_idx, dw_bank;
  logic [10:0] dw_addr; logic [7:0] cb_we; logic [9:0] db_we; logic [7:0] w_data; bias_t b_data;
  weight_loader dut (.clk, .rst_n, .in_valid, .in_data, .in_ready, .cw_we, .cw_bank, .cw_idx,
                     .cb_we, .dw_we, .dw_bank, .dw_addr, .db_we, .w_data, .b_data, .loaded);
  int n = 0, bad = 0;
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    automatic int strobes = int'(cw_we) + int'(dw_we) + $countones(cb_we) + $countones(db_we);
    automatic int k = n;
    automatic bit ok = (strobes == 1);
    if (k < N_CONV_W) ok &= cw_we && cw_bank == 3'(k / 9) && cw_idx == 4'(k % 9) && w_data == in_data[7:0];
    else if ((k -= N_CONV_W) < N_CONV_B) ok &= cb_we == 8'(1 << k) && b_data == in_data;
    else if ((k -= N_CONV_B) < N_DENSE_W) ok &= dw_we && dw_bank == 4'(k / DENSE_IN) && dw_addr == 11'(k % DENSE_IN) && w_data == in_data[7:0];
    else begin k -= N_DENSE_W; ok &= db_we == 10'(1 << k) && b_data == in_data; end
    if (!ok) begin bad++; if (bad < 5) $display("word %0d misrouted", n); end
    n++;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < N_WEIGHTS; i++) begin
      @(negedge clk); in_valid = 1; in_data = 16'($urandom);
      check(!loaded, "not loaded before the last weight");
      if ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    @(negedge clk);
    check(n == N_WEIGHTS, $sformatf("%0d weights taken", n));
    check(bad == 0, "all weights routed correctly");
    check(loaded && !in_ready, "loaded after the last weight");
    in_valid = 1; @(negedge clk); in_valid = 0;
    check(n == N_WEIGHTS, "nothing taken after loaded");
    finish_tb();
  end
endmodule
