// tb_input_loader: sends two images of 784 pixels with gaps; checks linear
// write addresses 0..783, the data, that image_loaded pulses exactly with the
// last pixel, and that nothing is written while enable is low.
`define WATCHDOG_CYCLES 20000
module tb_input_loader;
`include "tb_util.svh"
  import cnn_pkg::*;
  logic rst_n = 0, enable = 0, in_valid = 0; logic [7:0] in_data = '0; logic in_ready;
  logic wr_en, image_loaded; logic [9:0] wr_addr; logic [7:0] wr_data;
  input_loader dut (.clk, .rst_n, .enable, .in_valid, .in_data, .in_ready, .wr_en, .wr_addr, .wr_data, .image_loaded);
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    in_valid = 1; #1; check(!wr_en && !in_ready, "no write while disabled");
    @(negedge clk); in_valid = 0; enable = 1;
    for (int im = 0; im < 2; im++)
      for (int i = 0; i < N_PIX; i++) begin
        @(negedge clk); in_valid = 1; in_data = 8'($urandom); #1;
        check(wr_en && wr_addr == 10'(i) && wr_data == in_data, $sformatf("pixel %0d", i));
        check(image_loaded == (i == N_PIX - 1), "image_loaded with the last pixel only");
        @(negedge clk); in_valid = 0;
        if (i % 100 == 7) begin enable = 0; in_valid = 1; #1; check(!wr_en, "gated"); @(negedge clk); in_valid = 0; enable = 1; end
      end
    finish_tb();
  end
endmodule
