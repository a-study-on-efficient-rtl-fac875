// tb_maxpool_unit: eight channels pooled in lock step; each channel gets its
// own random pixels and must return its own maximum after every fourth pixel.
`define WATCHDOG_CYCLES 20000
module tb_maxpool_unit;
`include "tb_util.svh"
  import cnn_pkg::*;
  logic rst_n = 0, in_valid = 0; act_t in [N_CH]; act_t out [N_CH]; logic out_valid;
  maxpool_unit dut (.clk, .rst_n, .in_valid, .in, .out, .out_valid);
  initial begin
    act_t m [N_CH];
    for (int c = 0; c < N_CH; c++) in[c] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int w = 0; w < 200; w++) begin
      for (int k = 0; k < 4; k++) begin
        @(negedge clk); in_valid = 1;
        for (int c = 0; c < N_CH; c++) begin
          in[c] = act_t'($urandom);
          if (k == 0 || in[c] > m[c]) m[c] = in[c];
        end
      end
      @(negedge clk); in_valid = 0;
      check(out_valid, "pooled word valid");
      for (int c = 0; c < N_CH; c++) check(out[c] == m[c], $sformatf("window %0d ch %0d", w, c));
    end
    finish_tb();
  end
endmodule
