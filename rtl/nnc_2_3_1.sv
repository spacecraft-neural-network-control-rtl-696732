// nnc_2_3_1: the neural network controller, a 2-3-1 feed-forward network in
// IEEE-754 single precision.
//
// Its two inputs are the error current and the load current; the input layer
// only hands both to each of the three hidden neurons (U_0, U_1, U_2), whose
// outputs Y1, Y2, Y3 feed the output neuron (U_3). Every neuron uses the
// pure linear activation. The weights and biases are inputs, since they are
// trained off-chip and loaded from outside; the port names follow the
// controller's block diagram: W1k and W2k weight error and load current
// into hidden neuron k, b1k is its bias, W3k weights Y_k into the output and
// b3 is the output bias.
//
// Timing: the hidden neurons register their sums on a rising clk edge with
// load high (res clears them to +0); the output neuron is combinational, so
// nn_output is valid one clock after the inputs are loaded, 10 ns at the
// intended 100 MHz clock.
module nnc_2_3_1
  import fp32_pkg::*;
(
  input  logic     clk,
  input  logic     load,
  input  logic     res,
  input  float32_t error,
  input  float32_t il,
  input  float32_t w11,
  input  float32_t w21,
  input  float32_t b11,
  input  float32_t w12,
  input  float32_t w22,
  input  float32_t b12,
  input  float32_t w13,
  input  float32_t w23,
  input  float32_t b13,
  input  float32_t w31,
  input  float32_t w32,
  input  float32_t w33,
  input  float32_t b3,
  output float32_t y1,
  output float32_t y2,
  output float32_t y3,
  output float32_t nn_output
);

  hidden_neuron u_0 (.clk, .res, .load, .x_error(error), .x_il(il),
                     .w_error(w11), .w_il(w21), .bias(b11), .y(y1));
  hidden_neuron u_1 (.clk, .res, .load, .x_error(error), .x_il(il),
                     .w_error(w12), .w_il(w22), .bias(b12), .y(y2));
  hidden_neuron u_2 (.clk, .res, .load, .x_error(error), .x_il(il),
                     .w_error(w13), .w_il(w23), .bias(b13), .y(y3));

  output_neuron u_3 (.y1, .y2, .y3, .w1(w31), .w2(w32), .w3(w33),
                     .bias(b3), .y(nn_output));

endmodule
