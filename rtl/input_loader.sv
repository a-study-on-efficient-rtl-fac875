// input_loader: writes the pixels of one image into the input memory.
//
// Pixels arrive in raster order (row-major), one per accepted transfer
// (in_valid & in_ready); each is written to the next linear address. The
// loader accepts pixels only while enable is high (weights loaded and no
// convolution running). With the 784th pixel, image_loaded pulses for one
// cycle (the same cycle as that write) and the address counter returns to 0
// for the next image.
module input_loader
  import cnn_pkg::*;
#(
  parameter int NPIX = N_PIX,
  parameter int AW   = $clog2(NPIX)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_data,
  output logic             in_ready,
  output logic             wr_en,
  output logic [AW-1:0]    wr_addr,
  output logic [PIX_W-1:0] wr_data,
  output logic             image_loaded
);

  logic [AW-1:0] cnt_q;

  assign in_ready     = enable;
  assign wr_en        = in_valid && enable;
  assign wr_addr      = cnt_q;
  assign wr_data      = in_data;
  assign image_loaded = wr_en && (cnt_q == AW'(NPIX - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)            cnt_q <= '0;
    else if (image_loaded) cnt_q <= '0;
    else if (wr_en)        cnt_q <= cnt_q + 1'b1;
  end

endmodule
