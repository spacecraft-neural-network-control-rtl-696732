// tb_output_neuron: self-checking test of the output neuron. Random hidden
// outputs, weights and bias from all number classes are applied and the
// combinational output is compared with ((w1*y1 + w2*y2) + w3*y3) + bias,
// each step rounded to single precision by the reference model, plus one
// hand-worked case.
module tb_output_neuron;
  import fp_ref_pkg::*;

  logic [31:0] y1, y2, y3, w1, w2, w3, bias, y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  output_neuron dut (.y1, .y2, .y3, .w1, .w2, .w3, .bias, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] e, input string what);
    #1;
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s: got %h expected %h", what, y, e);
    end
  endtask

  initial begin
    // 1*1 + 2*0.5 + (-1)*3 + 0.5 = -0.5
    y1 = 32'h3f80_0000; w1 = 32'h3f80_0000;
    y2 = 32'h4000_0000; w2 = 32'h3f00_0000;
    y3 = 32'h4040_0000; w3 = 32'hbf80_0000;
    bias = 32'h3f00_0000;
    check(32'hbf00_0000, "hand-worked case");
    for (int i = 0; i < 30000; i++) begin
      int unsigned m;
      m  = $urandom;
      y1 = rand_fp(m);     y2 = rand_fp(m + 1); y3 = rand_fp(m + 2);
      w1 = rand_fp(m + 3); w2 = rand_fp(m);     w3 = rand_fp(m + 1);
      bias = rand_fp($urandom);
      check(ref_add(ref_add(ref_add(ref_mul(w1, y1), ref_mul(w2, y2)),
                            ref_mul(w3, y3)), bias), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
