// tb_max_finder: random sets of ten neurons, including ties and all-negative
// sets; checks the digit (lowest index among equal maxima), the value, and
// that the result comes exactly ten clocks after in_valid.
`define WATCHDOG_CYCLES 20000
module tb_max_finder;
`include "tb_util.svh"
  import cnn_pkg::*;
  logic rst_n = 0, in_valid = 0; act_t in [N_OUT]; logic busy, out_valid;
  logic [3:0] out_idx; act_t out_val;
  max_finder dut (.clk, .rst_n, .in_valid, .in, .busy, .out_idx, .out_val, .out_valid);
  initial begin
    for (int i = 0; i < N_OUT; i++) in[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      automatic int best = 0, lat = 0;
      for (int i = 0; i < N_OUT; i++) begin
        in[i] = act_t'($urandom);
        if (t % 4 == 1) in[i] = act_t'($urandom_range(0, 3));         // many ties
        if (t % 4 == 2) in[i] = -act_t'($urandom_range(1, 30000));   // all negative
      end
      if (t == 3) for (int i = 0; i < N_OUT; i++) in[i] = act_t'(i);  // rising: last wins
      for (int i = 1; i < N_OUT; i++) if (in[i] > in[best]) best = i;
      @(negedge clk); in_valid = 1;
      @(negedge clk); in_valid = 0;
      lat = 1;
      while (!out_valid) begin @(negedge clk); lat++; end
      check(lat == 10, $sformatf("latency %0d", lat));
      check(out_idx == 4'(best), $sformatf("set %0d: idx %0d vs %0d", t, out_idx, best));
      check(out_val == in[best], "max value");
    end
    finish_tb();
  end
endmodule
