// tb_input_memory: writes a random 28x28 image in raster order, then reads
// random (row, column) pairs and checks each against image[row][col], i.e.
// checks the row*28+column address translation and the one-cycle latency.
`define WATCHDOG_CYCLES 20000
module tb_input_memory;
`include "tb_util.svh"
  logic wr_en = 0, rd_en = 0; logic [9:0] wr_addr = '0; logic [7:0] wr_data = '0, rd_data;
  logic [4:0] rd_row = '0, rd_col = '0;
  logic [7:0] img [28][28];
  input_memory dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_row, .rd_col, .rd_data);
  initial begin
    for (int i = 0; i < 784; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = 10'(i); wr_data = 8'($urandom); img[i/28][i%28] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 1500; i++) begin
      automatic int r = $urandom_range(0, 27), c = $urandom_range(0, 27);
      if (i < 4) begin r = (i & 1) * 27; c = (i >> 1) * 27; end
      @(negedge clk); rd_en = 1; rd_row = 5'(r); rd_col = 5'(c);
      @(negedge clk); rd_en = 0;
      check(rd_data == img[r][c], $sformatf("pixel (%0d,%0d): %h vs %h", r, c, rd_data, img[r][c]));
    end
    finish_tb();
  end
endmodule
