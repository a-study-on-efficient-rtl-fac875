// tb_axi_lite_if: drives the AXI4-Lite slave with a simple master and models
// the accelerator side. Checks CONTROL read-back, that DATA_IN goes to the
// weight port when CONTROL=0 and to the pixel port when CONTROL=1, that a word
// stays held (WRITE_STATUS=1) while the loader is not ready, that a second
// DATA_IN write is refused with SLVERR, BUSY_STATUS, that a result is captured
// into RESULT with RESULT_STATUS set and cleared by reading RESULT, and SLVERR
// for unmapped reads and read-only writes. Random BREADY/RREADY delays test
// that responses are held.
`define WATCHDOG_CYCLES 50000
module tb_axi_lite_if;
`include "tb_util.svh"
  import cnn_pkg::*;
  logic rst_n = 0;
  logic [4:0] awaddr = '0, araddr = '0; logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = '0, rdata; logic awready, wready, bvalid, arready, rvalid; logic [1:0] bresp, rresp;
  logic wgt_valid, wgt_ready = 0, pix_valid, pix_ready = 0, busy = 0, result_valid = 0;
  logic [15:0] wgt_data; logic [7:0] pix_data; logic [3:0] result_idx = '0; act_t result_val = '0;
  axi_lite_if dut (.clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready), .s_axi_wdata(wdata),
    .s_axi_wstrb(4'hF), .s_axi_wvalid(wvalid), .s_axi_wready(wready), .s_axi_bresp(bresp),
    .s_axi_bvalid(bvalid), .s_axi_bready(bready), .s_axi_araddr(araddr), .s_axi_arvalid(arvalid),
    .s_axi_arready(arready), .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid),
    .s_axi_rready(rready),
    .wgt_valid, .wgt_data, .wgt_ready, .pix_valid, .pix_data, .pix_ready,
    .busy, .result_valid, .result_idx, .result_val);

  task automatic axi_write(input logic [4:0] a, input logic [31:0] d, output logic [1:0] resp);
    @(negedge clk); awaddr = a; awvalid = 1; wdata = d; wvalid = 1; bready = 0;
    #1; while (!awready) begin @(negedge clk); #1; end
    @(posedge clk); #1; awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    repeat ($urandom_range(0, 2)) begin @(negedge clk); check(bvalid, "BVALID held"); end
    resp = bresp; bready = 1; @(posedge clk); #1; bready = 0;
  endtask
  task automatic axi_read(input logic [4:0] a, output logic [31:0] d, output logic [1:0] resp);
    @(negedge clk); araddr = a; arvalid = 1; rready = 0;
    #1; while (!arready) begin @(negedge clk); #1; end
    @(posedge clk); #1; arvalid = 0;
    while (!rvalid) @(negedge clk);
    repeat ($urandom_range(0, 2)) begin @(negedge clk); check(rvalid, "RVALID held"); end
    d = rdata; resp = rresp; rready = 1; @(posedge clk); #1; rready = 0;
  endtask

  int n_wgt = 0, n_pix = 0; logic [15:0] last_w; logic [7:0] last_p;
  always @(posedge clk) begin
    if (wgt_valid && wgt_ready) begin n_wgt++; last_w = wgt_data; end
    if (pix_valid && pix_ready) begin n_pix++; last_p = pix_data; end
  end

  initial begin
    logic [31:0] d; logic [1:0] r;
    repeat (2) @(negedge clk); rst_n = 1;
    axi_write(5'h00, 32'h0, r); check(r == 0, "CONTROL write OKAY");
    axi_read(5'h00, d, r); check(d == 0 && r == 0, "CONTROL reads back");
    // weight path, loader ready
    wgt_ready = 1;
    for (int i = 0; i < 20; i++) begin
      automatic logic [31:0] v = $urandom;
      axi_write(5'h04, v, r); check(r == 0, "DATA_IN OKAY");
      axi_read(5'h10, d, r); check(d[0] == 0, "word taken at once");
      check(n_wgt == i + 1 && last_w == v[15:0] && n_pix == 0, "weight forwarded");
    end
    // held word
    wgt_ready = 0;
    axi_write(5'h04, 32'h1234, r); check(r == 0, "DATA_IN OKAY");
    axi_read(5'h10, d, r); check(d[0] == 1, "WRITE_STATUS shows held word");
    axi_write(5'h04, 32'h5678, r); check(r == 2'b10, "second write refused (SLVERR)");
    @(negedge clk); wgt_ready = 1; @(negedge clk); @(negedge clk); wgt_ready = 0;
    check(last_w == 16'h1234, "held word delivered, refused one dropped");
    axi_read(5'h10, d, r); check(d[0] == 0, "WRITE_STATUS cleared");
    // pixel path
    axi_write(5'h00, 32'h1, r);
    pix_ready = 1;
    axi_write(5'h04, 32'h5A, r);
    axi_read(5'h10, d, r);
    check(n_pix == 1 && last_p == 8'h5A && n_wgt == 21, "pixel forwarded to the input loader");
    // busy
    busy = 1; axi_read(5'h0C, d, r); check(d == 1, "BUSY_STATUS 1");
    busy = 0; axi_read(5'h0C, d, r); check(d == 0, "BUSY_STATUS 0");
    // result
    axi_read(5'h14, d, r); check(d == 0, "no result yet");
    @(negedge clk); result_valid = 1; result_idx = 4'd7; result_val = -16'sd300;
    @(negedge clk); result_valid = 0;
    axi_read(5'h14, d, r); check(d == 1, "RESULT_STATUS set");
    axi_read(5'h08, d, r); check(d[3:0] == 4'd7 && $signed(d[31:16]) == -300, "RESULT contents");
    axi_read(5'h14, d, r); check(d == 0, "RESULT_STATUS cleared by reading RESULT");
    // errors
    axi_read(5'h18, d, r); check(r == 2'b10 && d == 0, "unmapped read SLVERR");
    axi_write(5'h0C, 32'h1, r); check(r == 2'b10, "write to read-only SLVERR");
    finish_tb();
  end
endmodule
