// tb_conv_acc: feeds random groups of three partial sums (first, middle,
// last) and checks that out_valid pulses one clock after the last and that out
// is the 20-bit sum truncated to 16 bits; gaps between groups are random.
`define WATCHDOG_CYCLES 20000
module tb_conv_acc;
`include "tb_util.svh"
  import cnn_pkg::*;
  logic rst_n = 0, en = 0, first = 0, last = 0; logic signed [17:0] in = '0;
  act_t out; logic out_valid;
  int n_valid = 0;
  conv_acc dut (.clk, .rst_n, .en, .first, .last, .in, .out, .out_valid);
  always @(posedge clk) if (rst_n && out_valid) n_valid++;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int g = 0; g < 500; g++) begin
      automatic longint s = 0;
      for (int k = 0; k < 3; k++) begin
        @(negedge clk); en = 1; first = (k == 0); last = (k == 2); in = 18'($urandom);
        s += longint'(in);
        if (k < 2) begin #1; check(!out_valid || k > 0, "no early valid"); end
      end
      @(negedge clk); en = 0; first = 0; last = 0;
      check(out_valid, "out_valid one clock after last");
      check(out == act_t'(s >>> CONV_SHIFT), $sformatf("group %0d: %0d vs %0d", g, out, act_t'(s >>> CONV_SHIFT)));
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    check(n_valid == 500, "one valid per group");
    finish_tb();
  end
endmodule
