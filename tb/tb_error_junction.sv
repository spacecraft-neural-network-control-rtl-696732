// tb_error_junction: self-checking test of the error junction. Checks that
// e = (i_pv + i_bd) - i_l for hand-worked currents (sunlight, where the
// array feeds the load and the battery; eclipse, where the array gives
// nothing and the battery feeds the load) and for random values compared
// with the double-precision reference.
module tb_error_junction;
  import fp_ref_pkg::*;

  logic [31:0] i_pv, i_bd, i_l, e;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  error_junction dut (.i_pv, .i_bd, .i_l, .e);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] exp_e, input string what);
    #1;
    checks++;
    if (e !== exp_e) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s: got %h expected %h", what, e, exp_e);
    end
  endtask

  initial begin
    // sunlight: 10 A from the array, no discharge, 6 A load -> +4 A
    i_pv = 32'h4120_0000; i_bd = 32'h0; i_l = 32'h40c0_0000;
    check(32'h4080_0000, "sunlight");
    // eclipse: no array current, 5 A discharge, 6 A load -> -1 A
    i_pv = 32'h0; i_bd = 32'h40a0_0000; i_l = 32'h40c0_0000;
    check(32'hbf80_0000, "eclipse");
    // balanced: 3 + 3 - 6 = +0
    i_pv = 32'h4040_0000; i_bd = 32'h4040_0000; i_l = 32'h40c0_0000;
    check(32'h0, "balanced");
    for (int i = 0; i < 30000; i++) begin
      i_pv = rand_fp($urandom); i_bd = rand_fp($urandom); i_l = rand_fp($urandom);
      check(ref_add(ref_add(i_pv, i_bd), {~i_l[31], i_l[30:0]}), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
