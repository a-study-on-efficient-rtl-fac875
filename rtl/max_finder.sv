// max_finder: picks the output neuron with the largest value, replacing
// softmax (the class is all that is needed).
//
// On in_valid the ten 16-bit neurons are stored in ten registers. Then one
// comparator walks through them, one per cycle: cycle 1 compares neurons 0 and
// 1 and keeps the larger value and its index; cycles 2-9 compare the running
// maximum with neurons 2-9 and replace it only when the neuron is strictly
// larger (so on a tie the lower index wins). After cycle 9 the index (digit
// 0-9) and its value are presented with out_valid high for one cycle: ten
// clocks after in_valid. A new in_valid while busy is not accepted.
module max_finder
  import cnn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  act_t       in [N_OUT],
  output logic       busy,
  output logic [3:0] out_idx,
  output act_t       out_val,
  output logic       out_valid
);

  act_t       neuron [N_OUT];
  act_t       max_q;
  logic [3:0] idx_q;
  logic [3:0] cnt_q;      // 0 = idle, 1..9 = comparing neuron cnt_q

  assign busy = (cnt_q != 4'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      max_q     <= '0;
      idx_q     <= '0;
      out_idx   <= '0;
      out_val   <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < N_OUT; i++) neuron[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (cnt_q == 4'd0) begin
        if (in_valid) begin
          for (int i = 0; i < N_OUT; i++) neuron[i] <= in[i];
          cnt_q <= 4'd1;
        end
      end else begin
        if (cnt_q == 4'd1) begin
          if (neuron[1] > neuron[0]) begin max_q <= neuron[1]; idx_q <= 4'd1; end
          else                       begin max_q <= neuron[0]; idx_q <= 4'd0; end
          cnt_q <= 4'd2;
        end else begin
          if (neuron[cnt_q] > max_q) begin
            max_q <= neuron[cnt_q];
            idx_q <= cnt_q;
          end
          if (cnt_q == 4'(N_OUT - 1)) begin
            cnt_q     <= 4'd0;
            out_valid <= 1'b1;
            out_idx   <= (neuron[cnt_q] > max_q) ? cnt_q : idx_q;
            out_val   <= (neuron[cnt_q] > max_q) ? neuron[cnt_q] : max_q;
          end else begin
            cnt_q <= cnt_q + 4'd1;
          end
        end
      end
    end
  end

endmodule
