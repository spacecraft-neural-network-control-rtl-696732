// tb_nnc_2_3_1: self-checking test of the 2-3-1 network. For random inputs,
// weights and biases it checks Y1..Y3 (each hidden neuron's weighted sum of
// error and load current plus bias) and the network output (weighted sum of
// Y1..Y3 plus b3) one clock after loading, checks that the outputs hold with
// load low and that res clears the hidden registers (the output then shows
// b3 + 0-products). Each neuron gets distinct weights so that a crossed
// connection is seen.
module tb_nnc_2_3_1;
  import fp_ref_pkg::*;

  logic        clk = 1'b0, load, res;
  logic [31:0] error, il;
  logic [31:0] w11, w21, b11, w12, w22, b12, w13, w23, b13, w31, w32, w33, b3;
  logic [31:0] y1, y2, y3, nn_output;
  int checks = 0, failures = 0;

  nnc_2_3_1 dut (.clk, .load, .res, .error, .il,
                 .w11, .w21, .b11, .w12, .w22, .b12, .w13, .w23, .b13,
                 .w31, .w32, .w33, .b3, .y1, .y2, .y3, .nn_output);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] hid(input logic [31:0] we, wl, bb);
    return ref_add(ref_add(ref_mul(we, error), ref_mul(wl, il)), bb);
  endfunction

  function automatic logic [31:0] outn(input logic [31:0] a1, a2, a3);
    return ref_add(ref_add(ref_add(ref_mul(w31, a1), ref_mul(w32, a2)),
                           ref_mul(w33, a3)), b3);
  endfunction

  task automatic cmp(input logic [31:0] got, exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  task automatic randomize_all(input int unsigned m);
    error = rand_fp(m);     il  = rand_fp(m + 1);
    w11 = rand_fp(m + 2);   w21 = rand_fp(m + 3); b11 = rand_fp(m);
    w12 = rand_fp(m + 1);   w22 = rand_fp(m + 2); b12 = rand_fp(m + 3);
    w13 = rand_fp(m);       w23 = rand_fp(m + 1); b13 = rand_fp(m + 2);
    w31 = rand_fp(m + 3);   w32 = rand_fp(m);     w33 = rand_fp(m + 1);
    b3  = rand_fp(m + 2);
  endtask

  initial begin
    logic [31:0] e1, e2, e3;
    res = 1'b1; load = 1'b0;
    randomize_all(1);
    @(posedge clk); #1;
    cmp(y1, 32'h0, "y1 reset"); cmp(y2, 32'h0, "y2 reset"); cmp(y3, 32'h0, "y3 reset");
    cmp(nn_output, outn(32'h0, 32'h0, 32'h0), "output after reset");
    res = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      randomize_all((i < 2000) ? 1 : $urandom);
      e1 = hid(w11, w21, b11); e2 = hid(w12, w22, b12); e3 = hid(w13, w23, b13);
      load = 1'b1;
      @(posedge clk); #1;
      cmp(y1, e1, "y1"); cmp(y2, e2, "y2"); cmp(y3, e3, "y3");
      cmp(nn_output, outn(e1, e2, e3), "output");
      load = 1'b0;
      error = rand_fp($urandom); il = rand_fp($urandom);
      @(posedge clk); #1;
      cmp(y1, e1, "y1 hold"); cmp(y2, e2, "y2 hold"); cmp(y3, e3, "y3 hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
