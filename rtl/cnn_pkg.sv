// cnn_pkg: sizes, word widths and shared types of the MNIST CNN accelerator.
//
// The network is one 3x3x8 convolution layer on a 28x28 image, ReLU, 2x2
// max-pooling to 13x13x8, a 1352->10 fully connected layer and a max-finder
// in place of softmax. Weights and pixels are 8-bit signed fixed point and the
// intermediate layers are 16 bits wide, as the design specifies. The accumulator
// widths are the exact widths that cannot overflow, and the truncation shifts
// (where the binary point sits after each layer) are this design's own choice:
// the design states that the point moves per layer but gives no positions.
package cnn_pkg;

  // Network geometry
  localparam int IMG       = 28;                  // input image is IMG x IMG
  localparam int N_PIX     = IMG * IMG;           // 784 input pixels
  localparam int K         = 3;                   // 3x3 convolution kernel
  localparam int CONV_OUT  = IMG - K + 1;         // 26
  localparam int POOL_OUT  = CONV_OUT / 2;        // 13
  localparam int N_CH      = 8;                   // convolution filters
  localparam int N_OUT     = 10;                  // output neurons / classes
  localparam int DENSE_IN  = POOL_OUT * POOL_OUT * N_CH; // 1352

  // Word widths
  localparam int PIX_W     = 8;                   // input pixel
  localparam int WGT_W     = 8;                   // every main weight
  localparam int ACT_W     = 16;                  // intermediate-layer words
  localparam int BIAS_W    = 16;                  // bias registers
  localparam int CMAC_W    = 2 * PIX_W + 2;       // sum of 3 products: 18
  localparam int CONV_ACC_W = 2 * PIX_W + 4;      // sum of 9 products: 20
  localparam int DENSE_ACC_W = ACT_W + WGT_W + $clog2(DENSE_IN); // 35

  // Binary-point handling: bits dropped when truncating to 16 bits
  localparam int CONV_SHIFT  = 4;
  localparam int DENSE_SHIFT = 8;

  // Dense weight bank (one SRAM wrapper per output neuron)
  localparam int BANK_DEPTH = 1408;               // smallest sum of macros >= 1352
  localparam int BANK_AW    = 11;

  // Weight stream order from the CPU
  localparam int N_CONV_W  = N_CH * K * K;        // 72
  localparam int N_CONV_B  = N_CH;                // 8
  localparam int N_DENSE_W = N_OUT * DENSE_IN;    // 13520
  localparam int N_DENSE_B = N_OUT;               // 10
  localparam int N_WEIGHTS = N_CONV_W + N_CONV_B + N_DENSE_W + N_DENSE_B; // 13610

  typedef logic signed [ACT_W-1:0] act_t;
  typedef logic signed [WGT_W-1:0] wgt_t;
  typedef logic signed [PIX_W-1:0] pix_t;
  typedef logic signed [BIAS_W-1:0] bias_t;
  typedef logic [3*WGT_W-1:0]      row3_t;       // three 8-bit lanes, lane 0 in bits [7:0]

  // Truncation of an accumulator to a 16-bit word: drop SHIFT LSBs, keep 16.
  function automatic act_t trunc16(input logic signed [63:0] v, input int shift);
    logic signed [63:0] s;
    s = v >>> shift;
    return act_t'(s[ACT_W-1:0]);
  endfunction

endpackage
