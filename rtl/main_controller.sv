// main_controller: drives the accelerator's busy status.
//
// After reset the accelerator is busy until every weight is loaded (state
// INIT), so no image can be sent to an accelerator without weights. Then it is
// idle and takes pixels. When the last pixel of an image is written
// (image_loaded) it is busy again until the convolution unit reports that the
// convolution is complete (conv_done); the input memory is free from then on,
// so the next image may be loaded while the dense layer and max-finder finish
// the previous one. accept_pixels is high in IDLE only. Transitions take
// effect at the next clock.
module main_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic weights_loaded,
  input  logic image_loaded,
  input  logic conv_done,
  output logic busy,
  output logic accept_pixels
);

  typedef enum logic [1:0] {ST_INIT, ST_IDLE, ST_CONV} state_e;
  state_e state_q;

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= ST_INIT;
    else begin
      unique case (state_q)
        ST_INIT: if (weights_loaded) state_q <= ST_IDLE;
        ST_IDLE: if (image_loaded)   state_q <= ST_CONV;
        ST_CONV: if (conv_done)      state_q <= ST_IDLE;
        default:                     state_q <= ST_INIT;
      endcase
    end
  end

  assign busy          = (state_q != ST_IDLE);
  assign accept_pixels = (state_q == ST_IDLE);

endmodule
