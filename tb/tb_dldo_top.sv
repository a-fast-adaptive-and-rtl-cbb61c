`timescale 1ps/1ps
// tb_dldo_top: end-to-end load-transient test of the regulator core at its
// default parameters.
//
// The testbench closes the loop with an output node model: a 0.1 nF output
// capacitor integrated every 10 ps with (i_pass - i_load). The output is
// precharged to V_REF while reset is held (start-up is not part of the
// regulator core). Then:
//   phase 1  light load, 0.5 mA, for 2 us: V_OUT must stay in the window;
//   phase 2  load step to 22.9 mA (a 22.4 mA step, 1 ns edge): V_OUT droops
//            out of the window, the coarse loop must bring it back within
//            19.1 ns, and the fine loop must then hold it within 2 mV of V_REF.
// It counts how often each mechanism occurs (glitch events, coarse switches
// turned on and off, fine single steps, fine binary steps, the 8-switch step,
// fine holds while Lock is low) and fails if any never occurs.
module tb_dldo_top;
  localparam real C_OUT       = 0.1e-9;
  localparam int  DT_PS       = 10;
  localparam int  CLK_HALF_PS = 1000;      // 500 MHz F_CLK
  localparam real VREF        = 1.15;
  localparam real WIN         = 0.03;
  localparam real T_REC_MAX_NS = 19.1;

  logic clk = 1'b0, rst = 1'b0;
  real  vdd = 1.2, vref = VREF, vref_high = VREF + WIN, vref_low = VREF - WIN;
  real  vout = VREF, i_pass, i_load = 0.0;
  logic up_dn, high, low, lock, trigger;
  logic [15:0]  glitch, c_sw;
  logic [127:0] f_sw;
  logic [7:0]   fine_on, fine_step;
  int unsigned  coarse_on;

  int checks = 0, failures = 0;
  int n_glitch = 0, n_c_on = 0, n_c_off = 0, n_f_single = 0, n_f_binary = 0;
  int n_f_step8 = 0, n_f_hold = 0;
  bit done = 1'b0;

  dldo_top dut (.*);

  // Reset is raised just after time 0 so that its rising edge reaches the
  // asynchronously set coarse flip-flops.
  initial #1 rst = 1'b1;

  always #(CLK_HALF_PS) clk = ~clk;

  // Output node: capacitor charged by the pass devices, discharged by the load.
  always #(DT_PS) vout = vout + (i_pass - i_load) * (real'(DT_PS) * 1e-12) / C_OUT;

  // Mechanism counters.
  always @(posedge glitch[0]) if (!rst) n_glitch++;
  for (genvar i = 0; i < 16; i++) begin : g_mon
    always @(negedge c_sw[i]) if (!rst) n_c_on++;
    always @(posedge c_sw[i]) if (!rst) n_c_off++;
  end
  always @(posedge clk) if (!rst) begin
    if (!lock) n_f_hold++;
    if (fine_step == 8'd1) n_f_single++;
    if (fine_step > 8'd1) n_f_binary++;
    if (fine_step == 8'd8) n_f_step8++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  real    vmin, vmax, t_step, t_back;
  int     max_coarse;
  bit     in_win;

  initial begin
    #20000 rst = 1'b0;
    i_load = 0.5e-3;
    // Phase 1: light load.
    #1000000;
    vmin = 10.0; vmax = -10.0;
    repeat (1000) begin
      #1000;
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
    end
    $display("light load: vout in [%f, %f]", vmin, vmax);
    check(vmin > vref_low && vmax < vref_high, "light load: V_OUT left the window");
    check(coarse_on == 0, "light load: coarse switches should be off");
    // Phase 2: load step 0.5 mA -> 22.9 mA with a 1 ns edge.
    t_step = $realtime;
    repeat (10) begin
      #100 i_load = i_load + 2.24e-3;
    end
    vmin = 10.0; max_coarse = 0; t_back = -1.0;
    repeat (20000) begin
      #10;
      if (vout < vmin) vmin = vout;
      if (coarse_on > max_coarse) max_coarse = coarse_on;
      in_win = (vout > vref_low) && (vout < vref_high);
      if (!in_win) t_back = -1.0;
      else if (t_back < 0.0) t_back = $realtime;
    end
    $display("load step: droop %0.1f mV, back in window after %0.2f ns, max coarse on %0d",
             (VREF - vmin) * 1000.0, (t_back - t_step) / 1000.0, max_coarse);
    check(vmin < vref_low, "load step: no droop below the window");
    check(t_back > 0.0 && (t_back - t_step) / 1000.0 < T_REC_MAX_NS,
          "load step: recovery into the window too slow");
    check(max_coarse >= 8, "load step: coarse loop did not engage");
    // Settled regulation at heavy load.
    vmin = 10.0; vmax = -10.0;
    repeat (500) begin
      #1000;
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
      check(lock, "heavy load: Lock dropped in steady state");
    end
    $display("heavy load: vout in [%f, %f], coarse %0d, fine %0d", vmin, vmax, coarse_on, fine_on);
    check(vmin > VREF - 0.002 && vmax < VREF + 0.002, "heavy load: V_OUT not within 2 mV of V_REF");
    $display("mechanisms: glitch %0d, coarse on %0d, coarse off %0d, fine 1-step %0d, fine binary %0d, fine 8-step %0d, fine hold %0d",
             n_glitch, n_c_on, n_c_off, n_f_single, n_f_binary, n_f_step8, n_f_hold);
    check(n_glitch > 0,   "mechanism never seen: glitch");
    check(n_c_on > 0,     "mechanism never seen: coarse switch on");
    check(n_c_off > 0,    "mechanism never seen: coarse switch off");
    check(n_f_single > 0, "mechanism never seen: fine 1-switch step");
    check(n_f_binary > 0, "mechanism never seen: fine binary step");
    check(n_f_step8 > 0,  "mechanism never seen: fine 8-switch step");
    check(n_f_hold > 0,   "mechanism never seen: fine hold while Lock low");
    done = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    if (!done) begin
      failures++;
      $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
