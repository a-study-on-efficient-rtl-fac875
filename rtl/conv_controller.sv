// conv_controller: reads the image into the pixel registers and sequences the
// convolution, including the filter movement that lets max-pooling consume
// every output pixel as soon as it is produced.
//
// Pixel registers: four 24-bit registers, one per image row of the current
// strip of four rows. A pixel read from the input memory is steered (by row)
// into one register, which shifts by one lane: lane 2 takes the new pixel,
// lanes 1 and 0 the older ones, so the register always holds three adjacent
// columns. A multiplexer picks one register per cycle as the 24-bit pixel
// operand of all eight CMACs.
//
// Order of work: the image is covered in 13 strips of four input rows
// (rows 2s..2s+3), giving output rows 2s and 2s+1. Within a strip the window
// moves one column at a time; at each column it first produces the top output
// pixel (input rows 2s..2s+2) and then the bottom one (rows 2s+1..2s+3). So
// the four outputs of one 2x2 pooling window come out back to back: (top,c),
// (bottom,c), (top,c+1), (bottom,c+1). Each output takes three cycles, one
// kernel row per cycle (first/last mark the first and third). Every pixel
// read is reused by up to six output pixels.
//
// Timing per strip: 12 reads to fill the registers (columns 0-2, rows 0-3),
// one wait cycle for the last read, 6 compute cycles; then for each of the
// other 25 columns, 4 reads of the new column, 1 wait, 6 computes. That is
// 294 cycles per strip and 3822 per image. Loading and computing do not
// overlap; that is this design's choice, as the design gives no cycle counts.
// done pulses in the cycle after the last compute cycle.
module conv_controller
  import cnn_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  // input memory read port (one cycle latency)
  output logic             rd_en,
  output logic [4:0]       rd_row,
  output logic [4:0]       rd_col,
  input  logic [PIX_W-1:0] rd_data,
  // to the weight memory and the CMAC datapath
  output logic [1:0]       wgt_row,
  output row3_t            pix_row,
  output logic             mac_en,
  output logic             mac_first,
  output logic             mac_last,
  output logic             busy,
  output logic             done
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_WAIT, S_COMP} state_e;

  state_e     state_q;
  logic [3:0] strip_q;    // 0..12
  logic [4:0] col_q;      // output column 0..25
  logic [3:0] ld_q;       // read counter within a load phase
  logic [2:0] cmp_q;      // compute cycle 0..5
  row3_t      preg [4];   // pixel registers

  logic       rd_pend_q;
  logic [1:0] rd_reg_q;

  logic [3:0] n_loads;
  logic [1:0] ld_row;
  logic [4:0] ld_col;
  logic [1:0] krow;
  logic       sub;        // 0 = top output, 1 = bottom output

  assign n_loads = (col_q == 5'd0) ? 4'd12 : 4'd4;
  assign ld_row  = ld_q[1:0];
  assign ld_col  = (col_q == 5'd0) ? 5'(ld_q[3:2]) : col_q + 5'd2;

  assign rd_en   = (state_q == S_LOAD);
  assign rd_row  = 5'(strip_q) * 5'd2 + 5'(ld_row);
  assign rd_col  = ld_col;

  assign sub     = (cmp_q >= 3'd3);
  assign krow    = sub ? 2'(cmp_q - 3'd3) : cmp_q[1:0];
  assign wgt_row = krow;
  assign pix_row = preg[2'(krow + 2'(sub))];
  assign mac_en    = (state_q == S_COMP);
  assign mac_first = mac_en && (krow == 2'd0);
  assign mac_last  = mac_en && (krow == 2'd2);
  assign busy      = (state_q != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      strip_q   <= '0;
      col_q     <= '0;
      ld_q      <= '0;
      cmp_q     <= '0;
      rd_pend_q <= 1'b0;
      rd_reg_q  <= '0;
      done      <= 1'b0;
      for (int i = 0; i < 4; i++) preg[i] <= '0;
    end else begin
      done      <= 1'b0;
      rd_pend_q <= rd_en;
      rd_reg_q  <= ld_row;
      if (rd_pend_q)
        preg[rd_reg_q] <= {rd_data, preg[rd_reg_q][3*PIX_W-1:PIX_W]};

      unique case (state_q)
        S_IDLE:
          if (start) begin
            strip_q <= '0;
            col_q   <= '0;
            ld_q    <= '0;
            state_q <= S_LOAD;
          end
        S_LOAD:
          if (ld_q == n_loads - 4'd1) begin
            ld_q    <= '0;
            state_q <= S_WAIT;
          end else ld_q <= ld_q + 4'd1;
        S_WAIT: begin
          cmp_q   <= '0;
          state_q <= S_COMP;
        end
        S_COMP:
          if (cmp_q == 3'd5) begin
            if (col_q == 5'(CONV_OUT - 1)) begin
              col_q <= '0;
              if (strip_q == 4'(POOL_OUT - 1)) begin
                strip_q <= '0;
                state_q <= S_IDLE;
                done    <= 1'b1;
              end else begin
                strip_q <= strip_q + 4'd1;
                state_q <= S_LOAD;
              end
            end else begin
              col_q   <= col_q + 5'd1;
              state_q <= S_LOAD;
            end
          end else cmp_q <= cmp_q + 3'd1;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
