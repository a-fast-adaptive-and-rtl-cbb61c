`timescale 1ps/1ps
// tb_fast_adaptive_controller: checks the glitch-driven coarse controller.
//   * RST holds every gate off.
//   * A Trigger edge with UP_DN low turns the switches on one by one: switch i
//     turns on STAGE_PS*i after switch 0, and all 16 are on once the glitch
//     has left the chain (16 glitches counted).
//   * A Trigger edge with UP_DN high turns them all off the same way.
//   * UP_DN changing while the glitch travels turns on only the stages the
//     glitch reached before the change.
module tb_fast_adaptive_controller;
  localparam int N = 16, GLITCH = 300, STAGE = 200;
  logic rst = 1'b0, trigger = 1'b0, up_dn = 1'b1;
  logic [N-1:0] c_sw, glitch;
  int checks = 0, failures = 0, n_glitch = 0;
  bit done = 1'b0;

  fast_adaptive_controller dut (.*);

  // Reset is raised just after time 0 so that its rising edge reaches the
  // asynchronously set coarse flip-flops.
  initial #1 rst = 1'b1;

  for (genvar i = 0; i < N; i++) begin : g_cnt
    always @(posedge glitch[i]) n_glitch++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s c_sw=%b", $time, what, c_sw); end
  endtask

  function automatic int ones_off(input logic [N-1:0] v);
    int n = 0;
    for (int i = 0; i < N; i++) if (v[i]) n++;
    return n;
  endfunction

  initial begin
    #1000;
    check(c_sw == '1, "reset: gates must be off");
    up_dn = 1'b0;
    trigger = 1'b1;   // edge while in reset must not change anything
    #5000;
    check(c_sw == '1, "reset: gates must stay off");
    rst = 1'b0;
    #1000;
    check(c_sw == '1, "after reset: gates off until the first glitch");
    // Edge with UP_DN low: ripple on.
    n_glitch = 0;
    trigger = 1'b0;
    #(STAGE / 2);
    for (int i = 0; i < N; i++) begin
      check(c_sw == ({N{1'b1}} << (i + 1)), $sformatf("ripple on, stage %0d", i));
      #(STAGE);
    end
    #2000;
    check(c_sw == '0, "all switches on");
    check(n_glitch == N, $sformatf("glitch count %0d", n_glitch));
    // Edge with UP_DN high: ripple off.
    up_dn = 1'b1;
    #1000;
    trigger = 1'b1;
    #(STAGE * N + 1000);
    check(c_sw == '1, "all switches off");
    // UP_DN flips low-to-high while the glitch is in the chain.
    up_dn = 1'b0;
    #1000;
    trigger = 1'b0;
    #(STAGE * 5 + STAGE / 2);
    up_dn = 1'b1;
    #(STAGE * N + 1000);
    check(c_sw == ({N{1'b1}} << 6), "partial: first six stages on");
    check(ones_off(c_sw) == N - 6, "partial: ten stages off");
    // Reset again turns everything off.
    up_dn = 1'b0;
    trigger = 1'b1;
    #(STAGE * N + 1000);
    check(c_sw == '0, "all on before reset");
    rst = 1'b1;
    #10;
    check(c_sw == '1, "reset forces gates off at once");
    done = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    if (!done) begin
      failures++;
      $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
