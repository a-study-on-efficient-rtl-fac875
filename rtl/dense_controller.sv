// dense_controller: the max-pool buffer and the sequencing of the fully
// connected layer.
//
// Each pooled 8-channel word is captured in the max-pool buffer (eight 16-bit
// registers). Over the next eight cycles a multiplexer hands one channel per
// cycle to all ten MACs, while the controller reads the matching weight of
// every dense bank at the running weight address (one address per pixel,
// 0..1351, in the order the pixels arrive). The banks answer one cycle later,
// so the pixel, mac_en and mac_first are delayed by one register to line up
// with the weights. One clock after the MACs have taken the 1352nd product,
// neurons_valid pulses and the weight address returns to 0 for the next image.
// A new pooled word arrives at the earliest 12 cycles after the previous one,
// so the eight-cycle drain never overlaps the next capture; an assertion
// checks this.
module dense_controller
  import cnn_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pool_valid,
  input  act_t               pool [N_CH],
  // weight banks (read)
  output logic               mem_rd,
  output logic [BANK_AW-1:0] mem_addr,
  // MACs
  output logic               mac_en,
  output logic               mac_first,
  output act_t               mac_px,
  output logic               neurons_valid,
  output logic               busy
);

  act_t               buffer [N_CH];
  logic               sending_q;
  logic [2:0]         ch_q;
  logic [BANK_AW-1:0] waddr_q;
  logic               last_q;

  assign mem_rd   = sending_q;
  assign mem_addr = waddr_q;
  assign busy     = sending_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sending_q     <= 1'b0;
      ch_q          <= '0;
      waddr_q       <= '0;
      mac_en        <= 1'b0;
      mac_first     <= 1'b0;
      mac_px        <= '0;
      last_q        <= 1'b0;
      neurons_valid <= 1'b0;
      for (int i = 0; i < N_CH; i++) buffer[i] <= '0;
    end else begin
      // capture into the max-pool buffer
      if (pool_valid) begin
        for (int i = 0; i < N_CH; i++) buffer[i] <= pool[i];
        sending_q <= 1'b1;
        ch_q      <= '0;
      end else if (sending_q) begin
        if (ch_q == 3'(N_CH - 1)) sending_q <= 1'b0;
        ch_q <= ch_q + 3'd1;
      end
      // weight address
      if (sending_q)
        waddr_q <= (waddr_q == BANK_AW'(DENSE_IN - 1)) ? '0 : waddr_q + 1'b1;
      // one-cycle alignment with the bank read data
      mac_en        <= sending_q;
      mac_first     <= sending_q && (waddr_q == '0);
      mac_px        <= buffer[ch_q];
      last_q        <= sending_q && (waddr_q == BANK_AW'(DENSE_IN - 1));
      neurons_valid <= last_q;
    end
  end

  // a pooled word must not arrive while the buffer is still being drained
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    pool_valid |-> !sending_q || ch_q == 3'(N_CH - 1));

endmodule
