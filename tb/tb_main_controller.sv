// tb_main_controller: busy from reset until weights are loaded, idle, busy
// from image_loaded until conv_done, idle again; an image_loaded before the
// weights are in or a conv_done while idle must not change the state.
`define WATCHDOG_CYCLES 5000
module tb_main_controller;
`include "tb_util.svh"
  logic rst_n = 0, weights_loaded = 0, image_loaded = 0, conv_done = 0, busy, accept_pixels;
  main_controller dut (.clk, .rst_n, .weights_loaded, .image_loaded, .conv_done, .busy, .accept_pixels);
  task automatic pulse(ref logic s); @(negedge clk); s = 1; @(negedge clk); s = 0; endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); check(busy && !accept_pixels, "busy after reset");
    pulse(image_loaded); check(busy, "still busy without weights");
    repeat (5) @(negedge clk); check(busy, "busy while loading weights");
    @(negedge clk); weights_loaded = 1;
    @(negedge clk); check(!busy && accept_pixels, "idle once weights loaded");
    for (int im = 0; im < 3; im++) begin
      pulse(conv_done); check(!busy, "conv_done while idle ignored");
      pulse(image_loaded); check(busy && !accept_pixels, "busy after the image is loaded");
      repeat ($urandom_range(1, 20)) begin @(negedge clk); check(busy, "busy during convolution"); end
      pulse(conv_done); check(!busy && accept_pixels, "idle after convolution");
    end
    finish_tb();
  end
endmodule
