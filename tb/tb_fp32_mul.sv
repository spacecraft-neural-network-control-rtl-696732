// tb_fp32_mul: self-checking test of the single-precision multiplier.
// Directed cases (signed zeros, infinities, NaN, 0*inf, overflow, underflow
// to subnormal and to zero, a rounding tie) and 40,000 random operand pairs
// drawn from all number classes are compared bit for bit with a reference
// computed in double precision and rounded once to single precision.
module tb_fp32_mul;
  import fp_ref_pkg::*;

  logic [31:0] a, b, p;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  fp32_mul dut (.a, .b, .p);

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
    exp_p = ref_mul(x, y);
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH %h * %h: got %h expected %h", x, y, p, exp_p);
    end
  endtask

  initial begin
    check(32'h3f80_0000, 32'h4000_0000);   // 1 * 2
    check(32'h3fc0_0000, 32'hbfc0_0000);   // 1.5 * -1.5
    check(32'h0000_0000, 32'h8000_0000);   // +0 * -0
    check(32'h7f80_0000, 32'h0000_0000);   // inf * 0 -> NaN
    check(32'h7f80_0000, 32'hc000_0000);   // inf * -2
    check(32'h7fc0_0001, 32'h3f80_0000);   // NaN
    check(32'h7f7f_ffff, 32'h4000_0000);   // overflow
    check(32'h0080_0000, 32'h3f00_0000);   // min normal / 2 -> subnormal
    check(32'h0000_0001, 32'h3f00_0000);   // min subnormal / 2 -> tie to 0
    check(32'h0000_0003, 32'h3f00_0000);   // tie rounds to even
    check(32'h0040_0000, 32'h4b00_0000);   // subnormal * 2^23 -> normal
    check(32'h3f80_0001, 32'h3f80_0001);   // rounding of low bits
    check(32'h3fff_ffff, 32'h3fff_ffff);   // carry out of rounding
    for (int i = 0; i < 40000; i++)
      check(rand_fp($urandom), rand_fp($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
