// tb_sram_macro: writes random words to every address of a 512x8 macro, reads
// them back (one-cycle latency) and checks that dout holds while cs is low and
// that a write does not change dout.
`define WATCHDOG_CYCLES 20000
module tb_sram_macro;
`include "tb_util.svh"
  logic cs = 0, we = 0; logic [8:0] addr = '0; logic [7:0] din = '0, dout;
  logic [7:0] ref_mem [512];
  sram_macro #(.DEPTH(512)) dut (.clk, .cs, .we, .addr, .din, .dout);
  initial begin
    for (int a = 0; a < 512; a++) begin
      @(negedge clk); cs = 1; we = 1; addr = 9'(a); din = 8'($urandom); ref_mem[a] = din;
    end
    for (int a = 0; a < 512; a++) begin
      @(negedge clk); cs = 1; we = 0; addr = 9'(a);
      @(negedge clk); cs = 0;
      check(dout == ref_mem[a], $sformatf("read %0d: %h vs %h", a, dout, ref_mem[a]));
      addr = 9'($urandom);
      @(negedge clk);
      check(dout == ref_mem[a], "dout holds while cs low");
    end
    @(negedge clk); cs = 1; we = 1; addr = 0; din = ~ref_mem[0];
    @(negedge clk); cs = 0;
    check(dout == ref_mem[511], "write leaves dout alone");
    finish_tb();
  end
endmodule
