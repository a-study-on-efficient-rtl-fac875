// tb_mac: accumulates runs of random 16x8 signed products (runs of 1352, the
// dense layer's length, and short runs) and checks the truncated 16-bit output
// against a 64-bit integer sum after every product and at the end of each
// run; first=1 must restart the sum and idle cycles must hold it.
`define WATCHDOG_CYCLES 20000
module tb_mac;
`include "tb_util.svh"
  import cnn_pkg::*;
  logic rst_n = 0, en = 0, first = 0; act_t px = '0; wgt_t w = '0; act_t out;
  mac dut (.clk, .rst_n, .en, .first, .px, .w, .out);
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 8; run++) begin
      automatic longint s = 0;
      automatic int len = (run < 3) ? DENSE_IN : $urandom_range(1, 50);
      for (int k = 0; k < len; k++) begin
        en = 1; first = (k == 0);
        px = act_t'($urandom); w = wgt_t'($urandom);
        if (run == 0) begin px = 16'sh7fff; w = 8'sh80; end   // largest magnitude
        s += longint'(px) * longint'(w);
        @(negedge clk); en = 0;
        check(out == act_t'(s >>> DENSE_SHIFT), $sformatf("run %0d step %0d: %0d vs %0d", run, k, out, act_t'(s >>> DENSE_SHIFT)));
        if ($urandom_range(0, 3) == 0) @(negedge clk);   // idle cycle: the sum must hold
      end
      repeat (2) @(negedge clk);
      check(out == act_t'(s >>> DENSE_SHIFT), $sformatf("run %0d end: %0d vs %0d", run, out, act_t'(s >>> DENSE_SHIFT)));
    end
    finish_tb();
  end
endmodule
