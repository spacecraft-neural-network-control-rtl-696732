// tb_hidden_neuron: self-checking test of one hidden neuron. Checks that
// res clears the output register to +0, that with load high the output
// shows w_error*x_error + w_il*x_il + bias (products added first, then the
// bias, each step rounded to single precision) exactly one clock after the
// inputs are applied, and that with load low the output holds while the
// inputs change. Values are random, from all number classes.
module tb_hidden_neuron;
  import fp_ref_pkg::*;

  logic        clk = 1'b0, res, load;
  logic [31:0] x_error, x_il, w_error, w_il, bias, y;
  int checks = 0, failures = 0;

  hidden_neuron dut (.clk, .res, .load, .x_error, .x_il, .w_error, .w_il, .bias, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(input logic [31:0] xe, xl, we, wl, bb);
    return ref_add(ref_add(ref_mul(we, xe), ref_mul(wl, xl)), bb);
  endfunction

  task automatic expect_y(input logic [31:0] e, input string what);
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s: got %h expected %h", what, y, e);
    end
  endtask

  task automatic drive_random(input int unsigned mode);
    x_error = rand_fp(mode);       x_il = rand_fp(mode + 1);
    w_error = rand_fp(mode + 2);   w_il = rand_fp(mode + 3);
    bias    = rand_fp(mode);
  endtask

  initial begin
    logic [31:0] held, e;
    res = 1'b1; load = 1'b0;
    drive_random(1);
    @(posedge clk); #1;
    expect_y(32'h0, "after reset");
    res = 1'b0;

    for (int i = 0; i < 5000; i++) begin
      // load: the new sum must appear after exactly one edge
      drive_random($urandom);
      e = model(x_error, x_il, w_error, w_il, bias);
      load = 1'b1;
      held = y;
      #1;
      expect_y(held, "no change before the edge");
      @(posedge clk); #1;
      expect_y(e, "one clock after load");
      // hold: load low, inputs change, output stays
      load = 1'b0;
      drive_random($urandom);
      @(posedge clk); #1;
      expect_y(e, "hold with load low");
      if (i % 1000 == 999) begin
        res = 1'b1; load = 1'b1;
        @(posedge clk); #1;
        expect_y(32'h0, "reset wins over load");
        res = 1'b0; load = 1'b0;
      end
    end
    // a hand-worked case: 0.5*2 + 0.25*4 + 1 = 3.0
    x_error = 32'h4000_0000; w_error = 32'h3f00_0000;
    x_il    = 32'h4080_0000; w_il    = 32'h3e80_0000;
    bias    = 32'h3f80_0000; load = 1'b1;
    @(posedge clk); #1;
    expect_y(32'h4040_0000, "0.5*2 + 0.25*4 + 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
