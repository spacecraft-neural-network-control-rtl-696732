// fp32_pkg: shared types and constants for the IEEE-754 single-precision
// arithmetic of the neural network controller.
//
// A value is 32 bits: sign in bit 31, an 8-bit biased exponent in bits 30:23
// and a 23-bit fraction in bits 22:0, with value (-1)^s * 2^(e-127) * 1.b for
// normal numbers. That layout and the bias of 127 are the standard format the
// controller is built on. Subnormals, infinities and NaN follow IEEE-754; the
// choice of the canonical quiet NaN returned for invalid operations is this
// design's own.
//
// nnc_weights_t bundles the thirteen trained parameters of the 2-3-1 network
// (six hidden weights, three hidden biases, three output weights and the
// output bias), named as in the controller's block diagram.
package fp32_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned FP_W   = 1 + EXP_W + FRAC_W;
  localparam int unsigned BIAS   = 127;

  typedef logic [FP_W-1:0] float32_t;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_fields_t;

  localparam float32_t FP_QNAN     = 32'h7fc0_0000;
  localparam float32_t FP_POS_ZERO = 32'h0000_0000;
  localparam logic [EXP_W-1:0] EXP_MAX = '1;

  // Trained parameters of the 2-3-1 network. w<i><k>: weight from input i
  // (1 = error, 2 = load current) to hidden neuron k; b1<k>: hidden bias;
  // w3<k>: weight from hidden neuron k to the output; b3: output bias.
  typedef struct packed {
    float32_t w11, w21, b11;
    float32_t w12, w22, b12;
    float32_t w13, w23, b13;
    float32_t w31, w32, w33, b3;
  } nnc_weights_t;

endpackage
