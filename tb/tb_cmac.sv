// tb_cmac: random and corner-case pixel/weight rows; the 18-bit result must
// equal p0*w0 + p1*w1 + p2*w2 computed with signed integers.
`define WATCHDOG_CYCLES 20000
module tb_cmac;
`include "tb_util.svh"
  import cnn_pkg::*;
  row3_t pix, wgt; logic signed [17:0] sum;
  cmac dut (.pix, .wgt, .sum);
  initial begin
    for (int i = 0; i < 2000; i++) begin
      automatic int e = 0;
      pix = 24'($urandom); wgt = 24'($urandom);
      if (i == 0) begin pix = {3{8'h80}}; wgt = {3{8'h80}}; end
      if (i == 1) begin pix = {3{8'h80}}; wgt = {3{8'h7f}}; end
      #1;
      for (int j = 0; j < 3; j++) e += int'($signed(pix[8*j +: 8])) * int'($signed(wgt[8*j +: 8]));
      check(int'(sum) == e, $sformatf("sum %0d vs %0d", sum, e));
    end
    finish_tb();
  end
endmodule
