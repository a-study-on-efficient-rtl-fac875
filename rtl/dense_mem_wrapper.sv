// dense_mem_wrapper: one dense weight bank, a continuous 1408x8 address space
// split across several SRAM macros.
//
// The macros are stacked from address 0 upwards in the order of MACRO_DEPTH, so
// the default (config2: 512, 512, 256, 128) maps 0-511, 512-1023, 1024-1279 and
// 1280-1407. Each macro gets its own chip select, decoded from the address
// range; address and data in are shared and each macro sees the address minus
// its base. The range selected on a read is registered and steers the data-out
// multiplexer in the next cycle, when the macro's word appears (one cycle read
// latency, as the macros).
//
// The twelve SRAM-only breakdowns of the bank (config0 to config11, listed in
// the README) are each just a different parameter list, for example config0 =
// '{1024,256,128} or config9 = eleven 128s; the interface stays the same (up to
// 16 macros; entries from N_MACROS on are ignored). Splitting the bank into
// macros, the 1408-word size and the address-range chip selects follow the
// original design; for config0-config2 the published address ranges also fix
// the stacking order, for the other breakdowns largest-first is this design's
// choice. An address at or above the total depth selects no macro; reads then
// return zero.
module dense_mem_wrapper #(
  parameter int N_MACROS = 4,
  parameter int MACRO_DEPTH [16] = '{0: 512, 1: 512, 2: 256, 3: 128, default: 0},
  parameter int AW    = 11,
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cs,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  function automatic int base_of(input int idx);
    int b = 0;
    for (int i = 0; i < idx; i++) b += MACRO_DEPTH[i];
    return b;
  endfunction

  localparam int SELW = $clog2(N_MACROS + 1);

  logic [N_MACROS-1:0] hit;
  logic [WIDTH-1:0]    mdout [N_MACROS];
  logic [SELW-1:0]     rd_sel_q;   // macro index of the last read, N_MACROS = none
  logic [SELW-1:0]     sel;

  for (genvar g = 0; g < N_MACROS; g++) begin : g_macro
    localparam int BASE = base_of(g);
    localparam int DEP  = MACRO_DEPTH[g];
    localparam int MAW  = (DEP > 1) ? $clog2(DEP) : 1;
    logic [AW-1:0] local_addr;
    assign hit[g]     = (int'(addr) >= BASE) && (int'(addr) < BASE + DEP);
    assign local_addr = addr - AW'(BASE);
    sram_macro #(.DEPTH(DEP), .WIDTH(WIDTH)) u_sram (
      .clk (clk),
      .cs  (cs && hit[g]),
      .we  (we),
      .addr(local_addr[MAW-1:0]),
      .din (din),
      .dout(mdout[g])
    );
  end

  always_comb begin
    sel = SELW'(N_MACROS);
    for (int i = 0; i < N_MACROS; i++) if (hit[i]) sel = SELW'(i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)          rd_sel_q <= SELW'(N_MACROS);
    else if (cs && !we)  rd_sel_q <= sel;
  end

  always_comb begin
    dout = '0;
    for (int i = 0; i < N_MACROS; i++) if (rd_sel_q == SELW'(i)) dout = mdout[i];
  end

endmodule
