// hidden_neuron: one hidden-layer neuron of the 2-3-1 controller network.
//
// The neuron forms the weighted sum of its two inputs (the error current and
// the load current) plus its bias, v = w_error*x_error + w_il*x_il + bias,
// in IEEE-754 single precision. Its activation is the pure linear function,
// so the output is v itself. The two products are added first and the bias
// last; the order of the additions is this design's choice (floating-point
// addition is not associative).
//
// The result is held in a 32-bit output register: on a rising clk edge it
// is cleared to +0 when res is high, otherwise loaded with v when load is
// high, otherwise kept. Three such registers are the only flip-flops of the
// network. Timing: y shows the sum of the inputs present at the last edge
// with load high, one clock after they are applied. The clk, load and res
// pins are the controller's; that res is synchronous and active high, and
// that load is a register enable, are this design's reading of them.
// Two assertions state those register rules: reset clears, and without
// load or reset the output holds.
module hidden_neuron
  import fp32_pkg::*;
(
  input  logic     clk,
  input  logic     res,
  input  logic     load,
  input  float32_t x_error,
  input  float32_t x_il,
  input  float32_t w_error,
  input  float32_t w_il,
  input  float32_t bias,
  output float32_t y
);

  float32_t p_error, p_il, p_sum, v;

  fp32_mul u_mul_error (.a(w_error), .b(x_error), .p(p_error));
  fp32_mul u_mul_il    (.a(w_il),    .b(x_il),    .p(p_il));
  fp32_add u_add_prod  (.a(p_error), .b(p_il),    .s(p_sum));
  fp32_add u_add_bias  (.a(p_sum),   .b(bias),    .s(v));

  always_ff @(posedge clk) begin
    if (res)       y <= FP_POS_ZERO;
    else if (load) y <= v;
  end

  a_reset_clears: assert property (@(posedge clk) res |=> (y == FP_POS_ZERO))
    else $error("hidden_neuron: output not +0 after reset");
  a_hold: assert property (@(posedge clk) (!res && !load) |=> $stable(y))
    else $error("hidden_neuron: output changed with load low");

endmodule
