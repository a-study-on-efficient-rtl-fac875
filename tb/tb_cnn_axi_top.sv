// tb_cnn_axi_top: end-to-end test of the accelerator behind its AXI4-Lite
// port, at the full default size (28x28 image, 8 filters, 1352x10 dense).
//
// Acting as the processor, it loads a random set of weights, sends two random
// images back to back and reads both results, following the software protocol:
// poll WRITE_STATUS between DATA_IN writes, wait for BUSY_STATUS = 0 before the
// next image, read RESULT when RESULT_STATUS = 1. Every result (digit and
// neuron value) is compared with a reference model of the network written
// here in plain behavioural code (convolution, bias, ReLU, 2x2 max-pool,
// dense, arg-max, with the same truncations). Along the way it makes each
// mechanism of the design happen and counts it: busy during weight loading,
// busy during convolution, a pixel held in DATA_IN while busy (WRITE_STATUS),
// a dropped write to a full DATA_IN (SLVERR), a result arriving while the next
// image loads, RESULT_STATUS set and cleared, ReLU clipping and a max-pool
// window whose maximum is not its first pixel.
module tb_cnn_axi_top;
  timeunit 1ns; timeprecision 1ps;
  import cnn_pkg::*;

  localparam logic [4:0] A_CTRL = 5'h00, A_DATA = 5'h04, A_RES = 5'h08,
                         A_BUSY = 5'h0C, A_WST = 5'h10, A_RST = 5'h14;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 1'b0, wvalid = 1'b0, bready = 1'b0, arvalid = 1'b0, rready = 1'b0;
  logic [31:0] wdata = '0;
  logic        awready, wready, bvalid, arready, rvalid, busy;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;

  cnn_axi_top dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(4'hF), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .busy
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- AXI4-Lite master ----------------
  task automatic axi_write(input logic [4:0] a, input logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    awaddr = a; awvalid = 1'b1; wdata = d; wvalid = 1'b1; bready = 1'b1;
    #1;
    while (!awready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    awvalid = 1'b0; wvalid = 1'b0;
    while (!bvalid) @(negedge clk);
    resp = bresp;
    @(negedge clk);
    bready = 1'b0;
  endtask

  task automatic axi_read(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1'b1; rready = 1'b1;
    #1;
    while (!arready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    arvalid = 1'b0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk);
    rready = 1'b0;
  endtask

  // write DATA_IN, then poll WRITE_STATUS until the word has been taken
  int n_wait_pending = 0;
  task automatic send_word(input logic [31:0] d);
    logic [1:0]  r;
    logic [31:0] st;
    axi_write(A_DATA, d, r);
    check(r == 2'b00, $sformatf("DATA_IN write answered OKAY at %0t phase %0d idx %0d", $time, dut.u_accel.u_wload.phase_q, dut.u_accel.u_wload.idx_q));
    do begin
      axi_read(A_WST, st);
      if (st[0]) n_wait_pending++;
    end while (st[0]);
  endtask

  // ---------------- reference model ----------------
  logic signed [7:0]  cw [N_CH][9];
  logic signed [15:0] cb [N_CH];
  logic signed [7:0]  dw [N_OUT][DENSE_IN];
  logic signed [15:0] db [N_OUT];
  logic signed [7:0]  img [2][IMG][IMG];
  int n_relu_clip = 0, n_pool_later_max = 0;

  function automatic logic signed [15:0] t16(input longint v, input int sh);
    longint s = v >>> sh;
    return s[15:0];
  endfunction

  task automatic model(input int im, output int digit, output logic signed [15:0] value);
    logic signed [15:0] conv [N_CH][CONV_OUT][CONV_OUT];
    logic signed [15:0] pool [DENSE_IN];
    logic signed [15:0] neuron [N_OUT];
    for (int c = 0; c < N_CH; c++)
      for (int r = 0; r < CONV_OUT; r++)
        for (int q = 0; q < CONV_OUT; q++) begin
          longint s = 0;
          logic signed [15:0] v;
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++) s += longint'(img[im][r+i][q+j]) * longint'(cw[c][i*3+j]);
          v = t16(s, CONV_SHIFT) + cb[c];
          if (v < 0) begin v = 0; n_relu_clip++; end
          conv[c][r][q] = v;
        end
    for (int pr = 0; pr < POOL_OUT; pr++)
      for (int pc = 0; pc < POOL_OUT; pc++)
        for (int c = 0; c < N_CH; c++) begin
          logic signed [15:0] m;
          m = conv[c][2*pr][2*pc];
          if (conv[c][2*pr+1][2*pc] > m)   m = conv[c][2*pr+1][2*pc];
          if (conv[c][2*pr][2*pc+1] > m)   m = conv[c][2*pr][2*pc+1];
          if (conv[c][2*pr+1][2*pc+1] > m) m = conv[c][2*pr+1][2*pc+1];
          if (m != conv[c][2*pr][2*pc]) n_pool_later_max++;
          pool[(pr*POOL_OUT + pc)*N_CH + c] = m;
        end
    for (int n = 0; n < N_OUT; n++) begin
      longint s = 0;
      for (int k = 0; k < DENSE_IN; k++) s += longint'(pool[k]) * longint'(dw[n][k]);
      neuron[n] = t16(s, DENSE_SHIFT) + db[n];
    end
    digit = 0; value = neuron[0];
    for (int n = 1; n < N_OUT; n++) if (neuron[n] > value) begin digit = n; value = neuron[n]; end
  endtask

  // ---------------- monitors ----------------
  int busy_cycles_conv = 0, results_during_load = 0;
  bit loading_image = 1'b0;
  always @(posedge clk) if (rst_n && dut.u_accel.u_conv.busy) busy_cycles_conv++;
  always @(posedge clk) if (rst_n && dut.u_accel.result_valid && loading_image) results_during_load++;

  // ---------------- stimulus ----------------
  initial begin
    logic [31:0] d;
    logic [1:0]  r;
    int exp_digit [2];
    logic signed [15:0] exp_val [2];
    int n_busy_init = 0, n_busy_conv = 0, n_slverr = 0, n_rstat_set = 0, n_rstat_clr = 0;

    // random network; dense weights kept small so the neurons spread out
    for (int c = 0; c < N_CH; c++) begin
      for (int i = 0; i < 9; i++) cw[c][i] = 8'($urandom_range(0, 255));
      cb[c] = 16'($signed($urandom_range(0, 2047)) - 1024);
    end
    for (int n = 0; n < N_OUT; n++) begin
      for (int k = 0; k < DENSE_IN; k++) dw[n][k] = 8'($signed($urandom_range(0, 15)) - 8);
      db[n] = 16'($signed($urandom_range(0, 511)) - 256);
    end
    for (int m = 0; m < 2; m++)
      for (int y = 0; y < IMG; y++)
        for (int x = 0; x < IMG; x++) img[m][y][x] = 8'($urandom_range(0, 127));
    for (int m = 0; m < 2; m++) model(m, exp_digit[m], exp_val[m]);
    $display("model: image0 -> %0d (%0d), image1 -> %0d (%0d)", exp_digit[0], exp_val[0], exp_digit[1], exp_val[1]);

    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // busy right after reset, until all weights are in
    axi_read(A_BUSY, d);
    check(d[0] == 1'b1, "busy after reset");
    if (d[0]) n_busy_init++;

    // weights
    axi_write(A_CTRL, 32'd0, r);
    check(r == 2'b00, "CONTROL write OKAY");
    for (int c = 0; c < N_CH; c++) for (int i = 0; i < 9; i++) send_word(32'(cw[c][i]));
    for (int c = 0; c < N_CH; c++) send_word(32'(cb[c]));
    for (int n = 0; n < N_OUT; n++) for (int k = 0; k < DENSE_IN; k++) send_word(32'(dw[n][k]));
    for (int n = 0; n < N_OUT - 1; n++) send_word(32'(db[n]));
    axi_read(A_BUSY, d);
    check(d[0] == 1'b1, "still busy before the last weight");
    if (d[0]) n_busy_init++;
    send_word(32'(db[N_OUT-1]));
    axi_read(A_BUSY, d);
    check(d[0] == 1'b0, "idle once all weights are loaded");

    // image 0
    axi_write(A_CTRL, 32'd1, r);
    for (int y = 0; y < IMG; y++) for (int x = 0; x < IMG; x++) send_word(32'(img[0][y][x]));
    axi_read(A_BUSY, d);
    check(d[0] == 1'b1, "busy during convolution");
    if (d[0]) n_busy_conv++;

    // image 1: first pixel written while still busy is held in DATA_IN,
    // a second write to the full buffer is refused
    loading_image = 1'b1;
    axi_write(A_DATA, 32'(img[1][0][0]), r);
    check(r == 2'b00, "first pixel accepted into DATA_IN");
    axi_read(A_WST, d);
    check(d[0] == 1'b1, "WRITE_STATUS shows the held pixel");
    if (d[0]) n_wait_pending++;
    axi_write(A_DATA, 32'hFF, r);
    check(r == 2'b10, "write to full DATA_IN answered SLVERR");
    if (r == 2'b10) n_slverr++;
    do axi_read(A_BUSY, d); while (d[0]);
    do axi_read(A_WST, d); while (d[0]);
    for (int i = 1; i < N_PIX; i++) send_word(32'(img[1][i / IMG][i % IMG]));
    loading_image = 1'b0;

    // result of image 0 (arrived while image 1 was loading)
    axi_read(A_RST, d);
    check(d[0] == 1'b1, "RESULT_STATUS set for image 0");
    if (d[0]) n_rstat_set++;
    axi_read(A_RES, d);
    check(d[3:0] == 4'(exp_digit[0]), $sformatf("image 0 digit %0d, expected %0d", d[3:0], exp_digit[0]));
    check($signed(d[31:16]) == exp_val[0], $sformatf("image 0 value %0d, expected %0d", $signed(d[31:16]), exp_val[0]));
    axi_read(A_RST, d);
    check(d[0] == 1'b0, "RESULT_STATUS cleared by reading RESULT");
    if (!d[0]) n_rstat_clr++;

    // result of image 1
    do axi_read(A_RST, d); while (!d[0]);
    n_rstat_set++;
    axi_read(A_RES, d);
    check(d[3:0] == 4'(exp_digit[1]), $sformatf("image 1 digit %0d, expected %0d", d[3:0], exp_digit[1]));
    check($signed(d[31:16]) == exp_val[1], $sformatf("image 1 value %0d, expected %0d", $signed(d[31:16]), exp_val[1]));

    // convolution time: 13 strips x 294 cycles per image, two images
    check(busy_cycles_conv == 2 * 13 * 294, $sformatf("convolution took %0d cycles for two images", busy_cycles_conv));

    // every mechanism must have happened
    check(n_busy_init > 0,          "mechanism: busy during weight loading");
    check(n_busy_conv > 0,          "mechanism: busy during convolution");
    check(n_wait_pending > 0,       "mechanism: DATA_IN held (WRITE_STATUS=1)");
    check(n_slverr > 0,             "mechanism: write to full DATA_IN refused");
    check(results_during_load > 0,  "mechanism: result produced while next image loads");
    check(n_rstat_set == 2,         "mechanism: RESULT_STATUS set per image");
    check(n_rstat_clr > 0,          "mechanism: RESULT_STATUS cleared on read");
    check(n_relu_clip > 0,          "mechanism: ReLU clipped negative pixels");
    check(n_pool_later_max > 0,     "mechanism: max-pool kept a later pixel");
    $display("mechanisms: busy_init=%0d busy_conv=%0d held=%0d slverr=%0d result_during_load=%0d rstat_set=%0d rstat_clr=%0d relu_clip=%0d pool_later_max=%0d",
             n_busy_init, n_busy_conv, n_wait_pending, n_slverr, results_during_load, n_rstat_set, n_rstat_clr, n_relu_clip, n_pool_later_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
