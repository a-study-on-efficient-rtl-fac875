// tb_dense_unit: loads random weights into the ten banks and random biases,
// feeds a random 1352-value max-pooled vector as 169 eight-channel words, and
// compares the ten neurons with the reference dense layer. Six vectors are
// run back to back to check that the accumulators restart, and out_valid
// must pulse exactly once per vector.
`define WATCHDOG_CYCLES 60000
module tb_dense_unit;
`include "tb_util.svh"
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  logic rst_n = 0, pool_valid = 0, dw_we = 0, out_valid, busy;
  act_t pool [N_CH]; logic [3:0] dw_bank = '0; logic [10:0] dw_addr = '0; logic [7:0] dw_data = '0;
  logic [9:0] db_we = '0; bias_t db_data = '0; act_t out [N_OUT];
  dw_t dw; db_t db; pool_t p; neu_t expv;
  int n_ov = 0;
  act_t got [N_OUT];
  always @(posedge clk) if (rst_n && out_valid) begin n_ov++; got = out; end
  dense_unit dut (.clk, .rst_n, .pool_valid, .pool, .dw_we, .dw_bank, .dw_addr, .dw_data,
                  .db_we, .db_data, .out, .out_valid, .busy);
  initial begin
    for (int c = 0; c < N_CH; c++) pool[c] = '0;
    for (int n = 0; n < N_OUT; n++) begin
      for (int k = 0; k < DENSE_IN; k++) dw[n][k] = 8'($urandom);
      db[n] = bias_t'($urandom);
    end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < N_OUT; n++) for (int k = 0; k < DENSE_IN; k++) begin
      @(negedge clk); dw_we = 1; dw_bank = 4'(n); dw_addr = 11'(k); dw_data = dw[n][k];
    end
    @(negedge clk); dw_we = 0;
    for (int n = 0; n < N_OUT; n++) begin @(negedge clk); db_we = 10'(1 << n); db_data = db[n]; end
    @(negedge clk); db_we = 0;
    for (int v = 0; v < 6; v++) begin
      for (int k = 0; k < DENSE_IN; k++) p[k] = act_t'($urandom_range(0, 4000));
      expv = ref_dense(p, dw, db);
      for (int w = 0; w < DENSE_IN / N_CH; w++) begin
        @(negedge clk); pool_valid = 1;
        for (int c = 0; c < N_CH; c++) pool[c] = p[w*N_CH + c];
        @(negedge clk); pool_valid = 0;
        repeat (11) @(negedge clk);
      end
      while (n_ov < v + 1) @(negedge clk);
      for (int n = 0; n < N_OUT; n++) check(got[n] == expv[n], $sformatf("vector %0d neuron %0d: %0d vs %0d", v, n, got[n], expv[n]));
      repeat (20) @(negedge clk);
      check(n_ov == v + 1, $sformatf("vector %0d: %0d out_valid pulses in total", v, n_ov));
    end
    finish_tb();
  end
endmodule
