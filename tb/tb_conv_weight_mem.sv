// tb_conv_weight_mem: loads 72 random weights (8 filters x 9, row-major), then
// reads each kernel row of all eight banks in parallel and checks every lane:
// lane j of row r of bank c must be weight c*9 + r*3 + j. Also checks reset.
`define WATCHDOG_CYCLES 5000
module tb_conv_weight_mem;
`include "tb_util.svh"
  import cnn_pkg::*;
  logic rst_n = 0, wr_en = 0; logic [2:0] wr_bank = '0; logic [3:0] wr_idx = '0;
  logic [7:0] wr_data = '0; logic [1:0] rd_row = '0; row3_t rd_data [N_CH];
  logic [7:0] w [8][9];
  conv_weight_mem dut (.clk, .rst_n, .wr_en, .wr_bank, .wr_idx, .wr_data, .rd_row, .rd_data);
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < 8; c++) check(rd_data[c] == '0, "cleared by reset");
    for (int c = 0; c < 8; c++) for (int i = 0; i < 9; i++) begin
      @(negedge clk); wr_en = 1; wr_bank = 3'(c); wr_idx = 4'(i); wr_data = 8'($urandom); w[c][i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int r = 0; r < 3; r++) begin
      rd_row = 2'(r); #1;
      for (int c = 0; c < 8; c++) for (int j = 0; j < 3; j++)
        check(rd_data[c][8*j +: 8] == w[c][r*3+j], $sformatf("bank %0d row %0d lane %0d", c, r, j));
    end
    finish_tb();
  end
endmodule
