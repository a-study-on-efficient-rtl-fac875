// sram_macro: single-port synchronous SRAM, DEPTH x WIDTH, with chip select.
//
// Stands in for the 1024x8, 512x8, 256x8, 128x8 and 64x8 memory macros from
// which the dense weight banks are assembled. The pins are those of such a
// macro: chip select, write enable, address, data in and data out. A write
// happens at the clock edge when cs and we are high; a read (cs high, we low)
// returns the addressed word on dout after that edge (one cycle latency).
// dout holds its value while cs is low, so an unselected macro does not toggle
// its output. The array is a plain register array: a real flow swaps in the
// foundry macro with the same pins.
module sram_macro #(
  parameter int DEPTH = 512,
  parameter int WIDTH = 8,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             cs,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (cs) begin
      if (we) mem[addr] <= din;
      else    dout      <= mem[addr];
    end
  end

endmodule
