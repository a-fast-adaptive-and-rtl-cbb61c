`timescale 1ps/1ps
// tb_dldo_supply: the regulator core at its default parameters across the
// supply range: V_REF 1.05 V on a 1.1 V supply and V_REF 0.55 V on a 0.6 V
// supply (50 mV dropout), with a 0.1 nF output capacitor.
//   part 1  VDD 1.1 V: 0.5 mA, then a slow ramp to 2 mA; V_OUT must stay in
//           the +/-30 mV window and settle within 2 mV of V_REF. Then the
//           supply is stepped 1.1 V -> 1.2 V in 100 ns and V_OUT is reported
//           (no check: see the line-step note in the README).
//   part 2  VDD 0.6 V: 0.5 mA must stay in the window; a step to 22.9 mA
//           must be back in the window within 30 ns and settle within 2 mV.
module tb_dldo_supply;
  localparam real C_OUT       = 0.1e-9;
  localparam int  DT_PS       = 10;
  localparam real WIN         = 0.03;
  localparam int  CLK_HALF_PS = 1000;   // 500 MHz F_CLK

  logic clk = 1'b0, rst = 1'b0;
  real  vdd = 1.1, vref = 1.05, vref_high, vref_low;
  real  vout = 1.05, i_pass, i_load = 0.0;
  logic up_dn, high, low, lock, trigger;
  logic [15:0]  glitch, c_sw;
  logic [127:0] f_sw;
  logic [7:0]   fine_on, fine_step;
  int unsigned  coarse_on;
  int checks = 0, failures = 0;
  bit done = 1'b0;

  assign vref_high = vref + WIN;
  assign vref_low  = vref - WIN;

  dldo_top dut (.*);

  // Reset is raised just after time 0 so that its rising edge reaches the
  // asynchronously set coarse flip-flops.
  initial #1 rst = 1'b1;

  always #(CLK_HALF_PS) clk = ~clk;
  always #(DT_PS) vout = vout + (i_pass - i_load) * (real'(DT_PS) * 1e-12) / C_OUT;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  // Average and extremes of V_OUT over n ns.
  task automatic observe(input int n, output real avg, output real lo, output real hi);
    real s = 0.0;
    lo = 10.0; hi = -10.0;
    repeat (n) begin
      #1000;
      s += vout;
      if (vout < lo) lo = vout;
      if (vout > hi) hi = vout;
    end
    avg = s / n;
  endtask

  real avg, lo, hi, avg_hi;

  initial begin
    // Part 1: 1.1 V supply.
    #20000 rst = 1'b0;
    i_load = 0.5e-3;
    #500000;
    observe(300, avg, lo, hi);
    check(lo > vref_low && hi < vref_high, "VDD 1.1 V, 0.5 mA: V_OUT left the window");
    repeat (100) begin
      #10000 i_load = i_load + 15e-6;           // 0.5 mA -> 2 mA in 1 us
      check(vout > vref_low && vout < vref_high, "VDD 1.1 V: V_OUT left the window during the load ramp");
    end
    #1000000;
    observe(500, avg, lo, hi);
    $display("VDD 1.1 V, 2 mA: vout avg %f in [%f, %f]", avg, lo, hi);
    check(lo > vref - 0.002 && hi < vref + 0.002, "VDD 1.1 V, 2 mA: not within 2 mV of V_REF");
    for (int i = 1; i <= 100; i++) #1000 vdd = 1.1 + 0.001 * i;
    #500000;
    observe(500, avg_hi, lo, hi);
    $display("info: after a 1.1 V -> 1.2 V supply step, vout avg %f in [%f, %f]", avg_hi, lo, hi);

    // Part 2: 0.6 V supply.
    vdd = 0.6; vref = 0.55;
    rst = 1'b1; i_load = 0.0; vout = 0.55;
    #20000 rst = 1'b0;
    i_load = 0.5e-3;
    #1000000;
    observe(300, avg, lo, hi);
    $display("VDD 0.6 V, 0.5 mA: vout in [%f, %f]", lo, hi);
    check(lo > vref_low && hi < vref_high, "VDD 0.6 V, 0.5 mA: V_OUT left the window");
    i_load = 22.9e-3;
    #30000;
    check(vout > vref_low && vout < vref_high, "VDD 0.6 V: not back in the window 30 ns after the step");
    #500000;
    observe(300, avg, lo, hi);
    $display("VDD 0.6 V, 22.9 mA: vout in [%f, %f], coarse %0d, fine %0d", lo, hi, coarse_on, fine_on);
    check(lo > vref - 0.002 && hi < vref + 0.002, "VDD 0.6 V, 22.9 mA: not within 2 mV of V_REF");

    done = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    if (!done) begin
      failures++;
      $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
