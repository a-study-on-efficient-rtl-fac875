// input_memory: the 784x8 image memory and its memory controller.
//
// Writes come from the input loader with a linear address (raster order,
// row-major). Reads come from the convolution controller as an image (row,
// column) pair; the memory controller translates them to row*IMG + column, the
// address translation the design assigns to it. The storage is one single-port
// macro (sram_macro), so a write and a read in the same cycle are not
// supported: the write wins. Read data appears one cycle after the request.
// Using one macro rather than a set of smaller ones is this design's choice;
// the design allows either.
module input_memory
  import cnn_pkg::*;
#(
  parameter int IMG_DIM = IMG,
  parameter int DEPTH   = IMG_DIM * IMG_DIM,
  parameter int AW      = $clog2(DEPTH),
  parameter int RCW     = $clog2(IMG_DIM)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [PIX_W-1:0] wr_data,
  input  logic             rd_en,
  input  logic [RCW-1:0]   rd_row,
  input  logic [RCW-1:0]   rd_col,
  output logic [PIX_W-1:0] rd_data
);

  logic [AW-1:0] rd_addr;
  assign rd_addr = AW'(rd_row) * AW'(IMG_DIM) + AW'(rd_col);

  sram_macro #(.DEPTH(DEPTH), .WIDTH(PIX_W), .AW(AW)) u_mem (
    .clk (clk),
    .cs  (wr_en || rd_en),
    .we  (wr_en),
    .addr(wr_en ? wr_addr : rd_addr),
    .din (wr_data),
    .dout(rd_data)
  );

endmodule
