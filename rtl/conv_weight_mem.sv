// conv_weight_mem: convolution main weight memory, N_CH banks of 3 x 24 bits.
//
// Bank c holds filter c; word r of a bank holds kernel row r as three 8-bit
// lanes (lane j = kernel column j in bits [8j+7:8j]). The banks are registers,
// as the design specifies for these small memories, and every bank drives its
// own CMAC: all banks are read in parallel with the same row number, giving
// 8 x 24 = 192 weight bits per cycle. Loading writes one 8-bit weight per
// cycle, addressed by bank and by kernel position 0-8 in row-major order. The
// read is combinational; reset clears all weights.
module conv_weight_mem
  import cnn_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  logic [2:0]          wr_bank,
  input  logic [3:0]          wr_idx,     // 0..8, row-major kernel position
  input  logic [WGT_W-1:0]    wr_data,
  input  logic [1:0]          rd_row,     // kernel row 0..2
  output row3_t               rd_data [N_CH]
);

  row3_t bank [N_CH][K];
  logic [1:0] wr_row, wr_lane;

  assign wr_row  = 2'(wr_idx / 4'd3);
  assign wr_lane = 2'(wr_idx % 4'd3);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++)
        for (int r = 0; r < K; r++) bank[c][r] <= '0;
    end else if (wr_en) begin
      bank[wr_bank][wr_row][wr_lane * WGT_W +: WGT_W] <= wr_data;
    end
  end

  always_comb
    for (int c = 0; c < N_CH; c++) rd_data[c] = bank[c][rd_row];

endmodule
