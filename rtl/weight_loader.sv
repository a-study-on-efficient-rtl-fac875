// weight_loader: steers the weight stream from the CPU into the weight
// memories and bias registers and reports when all weights are in.
//
// Weights arrive one per accepted transfer (in_valid & in_ready) in a fixed
// order, which is this design's choice:
//   1. convolution weights, filter 0..7, each 9 weights row-major   (72)
//   2. convolution biases, channel 0..7                              (8)
//   3. dense weights, bank (output neuron) 0..9, each 1352 weights   (13520)
//      in flattened max-pool order (pool row, pool column, channel)
//   4. dense biases, neuron 0..9                                     (10)
// Main weights use the low 8 bits of in_data, biases all 16. Only one dense
// bank is written at a time. The write strobes are combinational from the
// accepted transfer. After the last bias, loaded goes high and stays high
// until reset; in_ready is low from then on.
module weight_loader
  import cnn_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [15:0]          in_data,
  output logic                 in_ready,
  // convolution main weights
  output logic                 cw_we,
  output logic [2:0]           cw_bank,
  output logic [3:0]           cw_idx,
  // convolution biases (one-hot per channel)
  output logic [N_CH-1:0]      cb_we,
  // dense main weights
  output logic                 dw_we,
  output logic [3:0]           dw_bank,
  output logic [BANK_AW-1:0]   dw_addr,
  // dense biases (one-hot per neuron)
  output logic [N_OUT-1:0]     db_we,
  // shared data
  output logic [WGT_W-1:0]     w_data,
  output bias_t                b_data,
  output logic                 loaded
);

  typedef enum logic [2:0] {PH_CONV_W, PH_CONV_B, PH_DENSE_W, PH_DENSE_B, PH_DONE} phase_e;

  phase_e              phase_q;
  logic [3:0]          bank_q;    // filter, channel, dense bank or neuron
  logic [BANK_AW-1:0]  idx_q;     // position within the bank

  logic take;
  assign in_ready = (phase_q != PH_DONE);
  assign take     = in_valid && in_ready;
  assign loaded   = (phase_q == PH_DONE);

  assign w_data  = in_data[WGT_W-1:0];
  assign b_data  = bias_t'(in_data);
  assign cw_bank = bank_q[2:0];
  assign cw_idx  = idx_q[3:0];
  assign dw_bank = bank_q;
  assign dw_addr = idx_q;

  always_comb begin
    cw_we = take && (phase_q == PH_CONV_W);
    dw_we = take && (phase_q == PH_DENSE_W);
    cb_we = '0;
    db_we = '0;
    if (take && phase_q == PH_CONV_B)  cb_we[bank_q[2:0]] = 1'b1;
    if (take && phase_q == PH_DENSE_B) db_we[bank_q]      = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q <= PH_CONV_W;
      bank_q  <= '0;
      idx_q   <= '0;
    end else if (take) begin
      unique case (phase_q)
        PH_CONV_W:
          if (idx_q == BANK_AW'(K * K - 1)) begin
            idx_q <= '0;
            if (bank_q == 4'(N_CH - 1)) begin bank_q <= '0; phase_q <= PH_CONV_B; end
            else bank_q <= bank_q + 4'd1;
          end else idx_q <= idx_q + 1'b1;
        PH_CONV_B:
          if (bank_q == 4'(N_CH - 1)) begin bank_q <= '0; phase_q <= PH_DENSE_W; end
          else bank_q <= bank_q + 4'd1;
        PH_DENSE_W:
          if (idx_q == BANK_AW'(DENSE_IN - 1)) begin
            idx_q <= '0;
            if (bank_q == 4'(N_OUT - 1)) begin bank_q <= '0; phase_q <= PH_DENSE_B; end
            else bank_q <= bank_q + 4'd1;
          end else idx_q <= idx_q + 1'b1;
        PH_DENSE_B:
          if (bank_q == 4'(N_OUT - 1)) begin bank_q <= '0; phase_q <= PH_DONE; end
          else bank_q <= bank_q + 4'd1;
        default: ;
      endcase
    end
  end

endmodule
