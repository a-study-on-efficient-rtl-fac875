// tb_maxpool_sub: sends windows of four random signed pixels (with random idle
// cycles in between) and checks that exactly one result per window appears,
// one clock after the fourth pixel, equal to the maximum of the four.
`define WATCHDOG_CYCLES 20000
module tb_maxpool_sub;
`include "tb_util.svh"
  import cnn_pkg::*;
  logic rst_n = 0, in_valid = 0; act_t in = '0, out; logic out_valid;
  int n_valid = 0;
  maxpool_sub dut (.clk, .rst_n, .in_valid, .in, .out, .out_valid);
  always @(posedge clk) if (rst_n && out_valid) n_valid++;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int w = 0; w < 500; w++) begin
      act_t m;
      for (int k = 0; k < 4; k++) begin
        @(negedge clk); in_valid = 1; in = act_t'($urandom);
        if (w % 3 == 0) in = -act_t'($urandom_range(1, 1000));   // all-negative windows
        if (k == 0 || in > m) m = in;
        @(negedge clk) ; in_valid = 0;
        if (k < 3) check(!out_valid, "no output before the fourth pixel");
        else begin
          check(out_valid, "output after the fourth pixel");
          check(out == m, $sformatf("window %0d: %0d vs %0d", w, out, m));
        end
        repeat ($urandom_range(0, 1)) @(negedge clk);
      end
    end
    @(negedge clk);
    check(n_valid == 500, "one output per window");
    finish_tb();
  end
endmodule
