// maxpool_sub: 2x2 max-pooling of one channel, built from a comparator, a
// multiplexer, one 16-bit register and a 2-bit counter.
//
// The convolution unit delivers the four pixels of a pooling window one after
// the other, so no line buffer is needed. The counter numbers the incoming
// pixels: the first is stored, the second and third replace the stored value
// when larger, and with the fourth the larger of it and the stored value is
// sent out (out_valid high for one cycle, one clock after the fourth pixel)
// while the register is cleared for the next window. Comparisons are signed.
module maxpool_sub
  import cnn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  act_t in,
  output act_t out,
  output logic out_valid
);

  logic [1:0] cnt_q;
  act_t       max_q;
  act_t       larger;

  assign larger = (in > max_q) ? in : max_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      max_q     <= '0;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        cnt_q <= cnt_q + 2'd1;
        unique case (cnt_q)
          2'd0:       max_q <= in;
          2'd1, 2'd2: max_q <= larger;
          2'd3: begin
            out       <= larger;
            out_valid <= 1'b1;
            max_q     <= '0;
          end
        endcase
      end
    end
  end

endmodule
