// axi_lite_if: AXI4-Lite slave that connects the accelerator to a SoC bus.
//
// Six 32-bit registers, word addressed by awaddr/araddr[4:2]:
//   0x00 CONTROL        RW  bit 0: 0 = DATA_IN goes to the weight loader,
//                                  1 = DATA_IN goes to the input loader
//   0x04 DATA_IN        W   one weight (bits 15:0) or one pixel (bits 7:0)
//   0x08 RESULT         R   bits 3:0 digit, bits 31:16 its neuron value;
//                           reading it clears RESULT_STATUS
//   0x0C BUSY_STATUS    R   bit 0: accelerator busy
//   0x10 WRITE_STATUS   R   bit 0: DATA_IN still holds a word not yet taken
//   0x14 RESULT_STATUS  R   bit 0: RESULT holds a new result
// The split into three status registers, one control register, one input
// buffer and one result buffer follows the design; the offsets and bit
// positions are this design's choice. A word written to DATA_IN is handed to
// the selected loader (valid/ready) as soon as that loader is ready; software
// polls WRITE_STATUS before the next write. A DATA_IN write while the buffer
// is full is dropped and answered with SLVERR; a write to a read-only or
// unmapped address is ignored and answered with SLVERR as well. Reads of
// unmapped addresses return 0 with SLVERR.
// Protocol: a write is taken when AWVALID and WVALID are both high and no
// response is pending (AWREADY = WREADY in that cycle); BVALID follows one
// clock later. A read is taken when no read data is pending; RVALID follows
// one clock later. WSTRB is ignored: all writes are full words.
module axi_lite_if
  import cnn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
  input  logic [4:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [4:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // accelerator side
  output logic        wgt_valid,
  output logic [15:0] wgt_data,
  input  logic        wgt_ready,
  output logic        pix_valid,
  output logic [7:0]  pix_data,
  input  logic        pix_ready,
  input  logic        busy,
  input  logic        result_valid,
  input  logic [3:0]  result_idx,
  input  act_t        result_val
);

  typedef enum logic [2:0] {
    R_CONTROL = 3'd0, R_DATA_IN = 3'd1, R_RESULT = 3'd2,
    R_BUSY = 3'd3, R_WSTAT = 3'd4, R_RSTAT = 3'd5
  } reg_e;

  localparam logic [1:0] OKAY = 2'b00, SLVERR = 2'b10;

  logic [31:0] control_q, data_q, result_q;
  logic        pending_q, rstat_q;

  logic wr_take, rd_take, taken, rd_result;
  reg_e wsel, rsel;

  assign wsel = reg_e'(s_axi_awaddr[4:2]);
  assign rsel = reg_e'(s_axi_araddr[4:2]);

  assign wr_take       = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr_take;
  assign s_axi_wready  = wr_take;
  assign rd_take       = s_axi_arvalid && !s_axi_rvalid;
  assign s_axi_arready = rd_take;
  assign rd_result     = rd_take && (rsel == R_RESULT);

  // hand the buffered word to the selected loader
  assign wgt_valid = pending_q && !control_q[0];
  assign pix_valid = pending_q &&  control_q[0];
  assign wgt_data  = data_q[15:0];
  assign pix_data  = data_q[7:0];
  assign taken     = (wgt_valid && wgt_ready) || (pix_valid && pix_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      control_q    <= '0;
      data_q       <= '0;
      result_q     <= '0;
      pending_q    <= 1'b0;
      rstat_q      <= 1'b0;
      s_axi_bvalid <= 1'b0;
      s_axi_bresp  <= OKAY;
      s_axi_rvalid <= 1'b0;
      s_axi_rresp  <= OKAY;
      s_axi_rdata  <= '0;
    end else begin
      // write channel
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (taken) pending_q <= 1'b0;
      if (wr_take) begin
        s_axi_bvalid <= 1'b1;
        s_axi_bresp  <= OKAY;
        unique case (wsel)
          R_CONTROL: control_q <= s_axi_wdata;
          R_DATA_IN:
            if (!pending_q) begin
              data_q    <= s_axi_wdata;
              pending_q <= 1'b1;
            end else s_axi_bresp <= SLVERR;
          default: s_axi_bresp <= SLVERR;
        endcase
      end
      // result capture; a read of RESULT clears the status unless a new
      // result arrives in the same cycle
      if (result_valid) begin
        result_q <= {result_val, 12'd0, result_idx};
        rstat_q  <= 1'b1;
      end else if (rd_result) rstat_q <= 1'b0;
      // read channel
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (rd_take) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rresp  <= OKAY;
        unique case (rsel)
          R_CONTROL: s_axi_rdata <= control_q;
          R_DATA_IN: s_axi_rdata <= data_q;
          R_RESULT:  s_axi_rdata <= result_q;
          R_BUSY:    s_axi_rdata <= {31'd0, busy};
          R_WSTAT:   s_axi_rdata <= {31'd0, pending_q};
          R_RSTAT:   s_axi_rdata <= {31'd0, rstat_q};
          default: begin
            s_axi_rdata <= '0;
            s_axi_rresp <= SLVERR;
          end
        endcase
      end
    end
  end

  // AXI rules for this slave: a response stays valid and stable until taken
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid && $stable(s_axi_bresp));
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
  // and for the master: a request is not withdrawn before it is taken
  a_awvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_awvalid && !s_axi_awready |=> s_axi_awvalid);
  a_arvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_arvalid && !s_axi_arready |=> s_axi_arvalid);

endmodule
