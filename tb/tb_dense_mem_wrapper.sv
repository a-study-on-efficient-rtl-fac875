// tb_dense_mem_wrapper: builds one bank for each of the twelve SRAM-only
// breakdowns of the 1408-word dense bank (config0 to config11, macros stacked
// largest first; config2, the default, is also instantiated without a
// parameter list). All of them share one bus. The test writes all 1408 words
// with random data, then reads every word back (plus 200 random addresses)
// with one-cycle latency and compares each bank's output with the reference.
// It also taps the first and last word of every macro and checks that they
// hold the addresses the stacking predicts (for the default: 0-511, 512-1023,
// 1024-1279, 1280-1407), and that a read above 1407 returns zero.
`define WATCHDOG_CYCLES 40000
module tb_dense_mem_wrapper;
`include "tb_util.svh"
  localparam int NCFG = 12;
  localparam int NM [NCFG] = '{3, 4, 4, 5, 5, 6, 7, 6, 6, 11, 7, 6};
  logic rst_n = 0, cs = 0, we = 0; logic [10:0] addr = '0; logic [7:0] din = '0;
  logic [7:0] d_def;
  logic [7:0] dq [NCFG];
  logic [7:0] ref_mem [1408];
  int dep [NCFG][16];                       // the test's own copy of the depths
  logic [7:0] pk_first [NCFG][16], pk_last [NCFG][16];

  dense_mem_wrapper u_def (.clk, .rst_n, .cs, .we, .addr, .din, .dout(d_def));

  // One bank per breakdown, with taps on the first and last word of each macro.
`define BANK(G, DEPTHS) \
  dense_mem_wrapper #(.N_MACROS(NM[G]), .MACRO_DEPTH(DEPTHS)) u_cfg``G \
    (.clk, .rst_n, .cs, .we, .addr, .din, .dout(dq[G])); \
  for (genvar m = 0; m < NM[G]; m++) begin : g_tap``G \
    always_comb begin \
      pk_first[G][m] = u_cfg``G.g_macro[m].u_sram.mem[0]; \
      pk_last[G][m]  = u_cfg``G.g_macro[m].u_sram.mem[dep[G][m] - 1]; \
    end \
  end
  `BANK(0,  '{0: 1024, 1: 256, 2: 128, default: 0})
  `BANK(1,  '{0: 1024, 1: 128, 2: 128, 3: 128, default: 0})
  `BANK(2,  '{0: 512, 1: 512, 2: 256, 3: 128, default: 0})
  `BANK(3,  '{0: 512, 1: 512, 2: 128, 3: 128, 4: 128, default: 0})
  `BANK(4,  '{0: 512, 1: 256, 2: 256, 3: 256, 4: 128, default: 0})
  `BANK(5,  '{0: 512, 1: 256, 2: 256, 3: 128, 4: 128, 5: 128, default: 0})
  `BANK(6,  '{0: 512, 1: 256, 2: 128, 3: 128, 4: 128, 5: 128, 6: 128, default: 0})
  `BANK(7,  '{0: 512, 1: 256, 2: 256, 3: 256, 4: 64, 5: 64, default: 0})
  `BANK(8,  '{0: 256, 1: 256, 2: 256, 3: 256, 4: 256, 5: 128, default: 0})
  `BANK(9,  '{default: 128})
  `BANK(10, '{0: 512, 1: 256, 2: 256, 3: 128, 4: 128, 5: 64, 6: 64, default: 0})
  `BANK(11, '{0: 512, 1: 512, 2: 128, 3: 128, 4: 64, 5: 64, default: 0})
`undef BANK

  initial begin
    dep = '{default: '{default: 0}};
    dep[0][0:2]  = '{1024, 256, 128};
    dep[1][0:3]  = '{1024, 128, 128, 128};
    dep[2][0:3]  = '{512, 512, 256, 128};
    dep[3][0:4]  = '{512, 512, 128, 128, 128};
    dep[4][0:4]  = '{512, 256, 256, 256, 128};
    dep[5][0:5]  = '{512, 256, 256, 128, 128, 128};
    dep[6][0:6]  = '{512, 256, 128, 128, 128, 128, 128};
    dep[7][0:5]  = '{512, 256, 256, 256, 64, 64};
    dep[8][0:5]  = '{256, 256, 256, 256, 256, 128};
    dep[9][0:10] = '{128, 128, 128, 128, 128, 128, 128, 128, 128, 128, 128};
    dep[10][0:6] = '{512, 256, 256, 128, 128, 64, 64};
    dep[11][0:5] = '{512, 512, 128, 128, 64, 64};
    for (int g = 0; g < NCFG; g++) begin
      automatic int tot = 0;
      for (int m = 0; m < NM[g]; m++) tot += dep[g][m];
      check(tot == 1408, $sformatf("config%0d holds %0d words", g, tot));
    end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 1408; a++) begin
      @(negedge clk); cs = 1; we = 1; addr = 11'(a); din = 8'($urandom); ref_mem[a] = din;
    end
    @(negedge clk); cs = 0; we = 0;
    for (int g = 0; g < NCFG; g++) begin
      automatic int base = 0;
      for (int m = 0; m < NM[g]; m++) begin
        check(pk_first[g][m] == ref_mem[base] && pk_last[g][m] == ref_mem[base + dep[g][m] - 1],
              $sformatf("config%0d: macro %0d holds addresses %0d-%0d", g, m, base, base + dep[g][m] - 1));
        base += dep[g][m];
      end
    end
    for (int i = 0; i < 1408 + 200; i++) begin
      automatic int a = (i < 1408) ? i : $urandom_range(0, 1407);
      @(negedge clk); cs = 1; we = 0; addr = 11'(a);
      @(negedge clk); cs = 0;
      check(d_def == ref_mem[a], $sformatf("default read %0d: %h vs %h", a, d_def, ref_mem[a]));
      for (int g = 0; g < NCFG; g++)
        check(dq[g] == ref_mem[a], $sformatf("config%0d read %0d: %h vs %h", g, a, dq[g], ref_mem[a]));
    end
    @(negedge clk); cs = 1; we = 0; addr = 11'd1500;
    @(negedge clk); cs = 0;
    check(d_def == '0, "read above the bank returns zero");
    finish_tb();
  end
endmodule
