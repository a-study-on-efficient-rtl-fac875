// tb_relu: out must be in for non-negative in and 0 for negative in,
// over all 65536 inputs.
`define WATCHDOG_CYCLES 20000
module tb_relu;
`include "tb_util.svh"
  import cnn_pkg::*;
  act_t in, out;
  relu dut (.in, .out);
  initial begin
    for (int v = -32768; v < 32768; v++) begin
      in = 16'(v); #1;
      check(out == ((v < 0) ? 16'sd0 : 16'(v)), $sformatf("relu(%0d) = %0d", v, out));
    end
    finish_tb();
  end
endmodule
