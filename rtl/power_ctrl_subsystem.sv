// power_ctrl_subsystem: the spacecraft power control subsystem built around
// the neural network controller.
//
// The battery charge current must make up the difference between what the
// solar array delivers and what the load draws. A summing junction forms
// the error current e = i_pv + i_bd - i_l, and the 2-3-1 neural network
// controller maps the pair (e, i_l) to delta_ibc, the change in battery
// charge current, which drives the battery subsystem outside this design.
// All currents are IEEE-754 single-precision values; the thirteen trained
// weights and biases arrive in one nnc_weights_t struct.
//
// Timing: e is combinational from the currents; the controller's hidden
// neurons register on a rising clk edge with load high (synchronous,
// active-high res clears them), so delta_ibc is valid one clock after the
// currents are applied. y1..y3 are the hidden outputs, brought out as the
// controller's block diagram does.
module power_ctrl_subsystem
  import fp32_pkg::*;
(
  input  logic         clk,
  input  logic         res,
  input  logic         load,
  input  float32_t     i_pv,
  input  float32_t     i_bd,
  input  float32_t     i_l,
  input  nnc_weights_t w,
  output float32_t     error,
  output float32_t     y1,
  output float32_t     y2,
  output float32_t     y3,
  output float32_t     delta_ibc
);

  error_junction u_junction (.i_pv, .i_bd, .i_l, .e(error));

  nnc_2_3_1 u_nnc (
    .clk, .load, .res,
    .error, .il(i_l),
    .w11(w.w11), .w21(w.w21), .b11(w.b11),
    .w12(w.w12), .w22(w.w22), .b12(w.b12),
    .w13(w.w13), .w23(w.w23), .b13(w.b13),
    .w31(w.w31), .w32(w.w32), .w33(w.w33), .b3(w.b3),
    .y1, .y2, .y3, .nn_output(delta_ibc)
  );

endmodule
