// error_junction: the summing junction in front of the neural network
// controller. It forms the controller's error input from the three sensed
// currents, e = i_pv + i_bd - i_l: solar-array current and battery discharge
// current count positive, load current negative, as the control-subsystem
// diagram marks them.
//
// How it works: two IEEE-754 single-precision adders, (i_pv + i_bd) first,
// then the load current added with its sign bit flipped. The order of the
// two additions is this design's choice.
//
// Interface: three currents in, e out, all IEEE-754 single precision.
// Timing: combinational.
module error_junction
  import fp32_pkg::*;
(
  input  float32_t i_pv,
  input  float32_t i_bd,
  input  float32_t i_l,
  output float32_t e
);

  float32_t src_sum, neg_il;

  assign neg_il = {~i_l[31], i_l[30:0]};

  fp32_add u_add_src (.a(i_pv),    .b(i_bd),   .s(src_sum));
  fp32_add u_sub_load(.a(src_sum), .b(neg_il), .s(e));

endmodule
