// tb_power_ctrl_subsystem: end-to-end test of the power control subsystem
// at its default configuration, clocked at 100 MHz.
//
// A fixed set of network weights (values of moderate size, as a trained
// controller would have) is applied, and a sequence of operating points is
// run through the subsystem: sunlight, where the solar array supplies the
// load and there is no battery discharge, and eclipse, where the array
// gives no current and the battery discharges into the load. For each point
// the testbench checks the error current, the three hidden outputs and
// delta_ibc against the double-precision reference, and measures the time
// from applying the currents to a valid delta_ibc, which must be within
// 100 ns. It also exercises reset (hidden registers cleared) and hold (load
// low, outputs unchanged while the currents move), and counts how often each
// of these happened; a mechanism that never happened counts as a failure.
module tb_power_ctrl_subsystem;
  import fp_ref_pkg::*;
  import fp32_pkg::nnc_weights_t;

  logic         clk = 1'b0, res, load;
  logic [31:0]  i_pv, i_bd, i_l;
  nnc_weights_t w;
  logic [31:0]  error, y1, y2, y3, delta_ibc;
  int checks = 0, failures = 0;
  int n_sun = 0, n_eclipse = 0, n_reset = 0, n_hold = 0, n_load = 0;
  realtime t_apply, worst_latency = 0.0;

  power_ctrl_subsystem dut (.clk, .res, .load, .i_pv, .i_bd, .i_l, .w,
                            .error, .y1, .y2, .y3, .delta_ibc);

  always #5 clk = ~clk;   // 100 MHz

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input logic [31:0] got, exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  function automatic logic [31:0] hid(input logic [31:0] e, l, we, wl, bb);
    return ref_add(ref_add(ref_mul(we, e), ref_mul(wl, l)), bb);
  endfunction

  // A current in amperes (0 .. about 20 A) as a single-precision value.
  function automatic logic [31:0] amps(input int unsigned milliamps);
    return r2f(real'(milliamps) / 1000.0);
  endfunction

  function automatic logic [31:0] weight(input int signed milli);
    return r2f(real'(milli) / 1000.0);
  endfunction

  task automatic run_point(input bit eclipse);
    logic [31:0] e, h1, h2, h3, out;
    if (eclipse) begin
      i_pv = 32'h0;
      i_bd = amps(1000 + $urandom % 15000);
      n_eclipse++;
    end else begin
      i_pv = amps(5000 + $urandom % 15000);
      i_bd = 32'h0;
      n_sun++;
    end
    i_l = amps(500 + $urandom % 15000);
    load = 1'b1;
    t_apply = $realtime;
    e  = ref_add(ref_add(i_pv, i_bd), {~i_l[31], i_l[30:0]});
    h1 = hid(e, i_l, w.w11, w.w21, w.b11);
    h2 = hid(e, i_l, w.w12, w.w22, w.b12);
    h3 = hid(e, i_l, w.w13, w.w23, w.b13);
    out = ref_add(ref_add(ref_add(ref_mul(w.w31, h1), ref_mul(w.w32, h2)),
                          ref_mul(w.w33, h3)), w.b3);
    #1;
    cmp(error, e, "error current");
    // wait for the result, at most 10 cycles (100 ns)
    for (int c = 0; c < 10; c++) begin
      @(posedge clk); #1;
      if (delta_ibc === out && y1 === h1 && y2 === h2 && y3 === h3) break;
    end
    if ($realtime - t_apply > worst_latency) worst_latency = $realtime - t_apply;
    checks++;
    if ($realtime - t_apply > 100.0) begin
      failures++;
      $display("latency %0t above 100 ns", $realtime - t_apply);
    end
    cmp(y1, h1, "y1"); cmp(y2, h2, "y2"); cmp(y3, h3, "y3");
    cmp(delta_ibc, out, eclipse ? "delta_ibc (eclipse)" : "delta_ibc (sunlight)");
    n_load++;
    // hold: load low, currents move, outputs stay
    load = 1'b0;
    i_l  = amps($urandom % 20000);
    i_pv = amps($urandom % 20000);
    @(posedge clk); #1;
    cmp(y1, h1, "y1 hold"); cmp(delta_ibc, out, "delta_ibc hold");
    n_hold++;
  endtask

  initial begin
    w.w11 = weight(-850); w.w21 = weight(420);  w.b11 = weight(130);
    w.w12 = weight(610);  w.w22 = weight(-275); w.b12 = weight(-60);
    w.w13 = weight(1240); w.w23 = weight(95);   w.b13 = weight(310);
    w.w31 = weight(720);  w.w32 = weight(-1130); w.w33 = weight(480);
    w.b3  = weight(-25);
    i_pv = 32'h0; i_bd = 32'h0; i_l = 32'h0;
    res = 1'b1; load = 1'b0;
    @(posedge clk); #1;
    cmp(y1, 32'h0, "y1 reset"); cmp(y2, 32'h0, "y2 reset"); cmp(y3, 32'h0, "y3 reset");
    cmp(delta_ibc, w.b3, "delta_ibc after reset is b3");
    n_reset++;
    res = 1'b0;
    for (int i = 0; i < 400; i++) begin
      run_point(i % 3 == 2);
      if (i % 100 == 50) begin
        res = 1'b1;
        @(posedge clk); #1;
        cmp(y1, 32'h0, "y1 reset"); cmp(delta_ibc, w.b3, "delta_ibc reset");
        n_reset++;
        res = 1'b0;
      end
    end
    $display("operating points: sunlight %0d eclipse %0d; loads %0d holds %0d resets %0d",
             n_sun, n_eclipse, n_load, n_hold, n_reset);
    $display("worst latency from inputs to delta_ibc: %0.1f ns", worst_latency);
    checks++; if (n_sun == 0)     begin failures++; $display("no sunlight point");  end
    checks++; if (n_eclipse == 0) begin failures++; $display("no eclipse point");   end
    checks++; if (n_hold == 0)    begin failures++; $display("no hold");            end
    checks++; if (n_reset == 0)   begin failures++; $display("no reset");           end
    checks++; if (n_load == 0)    begin failures++; $display("no load");            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
