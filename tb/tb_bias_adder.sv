// tb_bias_adder: loads a bias, checks out = in + bias (16-bit wrap) for random
// inputs, reloads a new bias, and checks reset clears it.
`define WATCHDOG_CYCLES 5000
module tb_bias_adder;
`include "tb_util.svh"
  import cnn_pkg::*;
  logic rst_n = 0, bias_we = 0; bias_t bias_wdata = '0; act_t in = '0, out;
  bias_adder dut (.clk, .rst_n, .bias_we, .bias_wdata, .in, .out);
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    in = 16'sd1234; #1; check(out == 16'sd1234, "zero bias after reset");
    for (int k = 0; k < 4; k++) begin
      bias_t b = bias_t'($urandom);
      @(negedge clk); bias_we = 1; bias_wdata = b;
      @(negedge clk); bias_we = 0;
      for (int i = 0; i < 200; i++) begin
        in = act_t'($urandom); #1;
        check(out == act_t'(in + b), $sformatf("%0d + %0d = %0d", in, b, out));
      end
    end
    finish_tb();
  end
endmodule
