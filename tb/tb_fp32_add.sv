// tb_fp32_add: self-checking test of the single-precision adder.
// Directed cases (signed zeros, infinities, NaN, 0*inf, overflow, underflow
// to subnormal and to zero, a rounding tie) and 40,000 random operand pairs
// drawn from all number classes are compared bit for bit with a reference
// computed in double precision and rounded once to single precision.
module tb_fp32_add;
  import fp_ref_pkg::*;

  logic [31:0] a, b, p;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  fp32_add dut (.a, .b, .s(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] exp_p;
    a = x; b = y;
    #1;
    exp_p = ref_add(x, y);
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH %h + %h: got %h expected %h", x, y, p, exp_p);
    end
  endtask

  initial begin
    check(32'h3f80_0000, 32'h4000_0000);   // 1 + 2
    check(32'h3f80_0000, 32'hbf80_0000);   // x + -x -> +0
    check(32'h8000_0000, 32'h8000_0000);   // -0 + -0 -> -0
    check(32'h7f80_0000, 32'hff80_0000);   // inf - inf -> NaN
    check(32'h7f80_0000, 32'h3f80_0000);   // inf + 1
    check(32'h3f80_0000, 32'hff80_0000);   // 1 - inf
    check(32'hffc0_0000, 32'h3f80_0000);   // NaN
    check(32'h7f7f_ffff, 32'h7f7f_ffff);   // overflow
    check(32'h7f7f_ffff, 32'h7380_0000);   // rounding up to overflow
    check(32'h0000_0001, 32'h0000_0001);   // subnormal + subnormal
    check(32'h007f_ffff, 32'h0000_0001);   // subnormal carries into normal
    check(32'h0080_0000, 32'h8000_0001);   // normal - subnormal -> subnormal
    check(32'h3f80_0000, 32'h3380_0000);   // 1 + 2^-24: tie to even
    check(32'h3f80_0001, 32'h3380_0000);   // tie rounds up to even
    check(32'h3f80_0000, 32'hb380_0001);   // subtraction with sticky bits
    check(32'h4b00_0000, 32'hbf80_0000);   // 2^23 - 1
    check(32'h3f80_0001, 32'hbf80_0000);   // massive cancellation
    check(32'h5f00_0000, 32'h2000_0000);   // huge exponent difference
    for (int i = 0; i < 20000; i++) begin : near_cancel
      logic [31:0] x;
      x = rand_fp($urandom);
      check(x, {~x[31], x[30:8], 8'($urandom)});
    end
    for (int i = 0; i < 40000; i++)
      check(rand_fp($urandom), rand_fp($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
