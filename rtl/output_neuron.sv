// output_neuron: the output-layer neuron of the 2-3-1 controller network.
//
// It forms out = w1*y1 + w2*y2 + w3*y3 + bias in IEEE-754 single precision
// from the three hidden-neuron outputs, and its pure linear activation
// passes that sum on unchanged. The sum is accumulated in index order,
// ((w1*y1 + w2*y2) + w3*y3) + bias; that order is this design's choice.
//
// Interface: three hidden outputs, three weights and the bias in, y out.
// Timing: combinational; since its inputs come from the hidden neurons'
// registers, the network output is valid one clock after the inputs are
// loaded. The controller's block diagram gives this neuron no clock, load
// or reset pin, which this design follows.
module output_neuron
  import fp32_pkg::*;
(
  input  float32_t y1,
  input  float32_t y2,
  input  float32_t y3,
  input  float32_t w1,
  input  float32_t w2,
  input  float32_t w3,
  input  float32_t bias,
  output float32_t y
);

  float32_t p1, p2, p3, s12, s123;

  fp32_mul u_mul1 (.a(w1), .b(y1), .p(p1));
  fp32_mul u_mul2 (.a(w2), .b(y2), .p(p2));
  fp32_mul u_mul3 (.a(w3), .b(y3), .p(p3));
  fp32_add u_add12   (.a(p1),   .b(p2),   .s(s12));
  fp32_add u_add123  (.a(s12),  .b(p3),   .s(s123));
  fp32_add u_add_bias(.a(s123), .b(bias), .s(y));

endmodule
