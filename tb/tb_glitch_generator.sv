`timescale 1ps/1ps
// tb_glitch_generator: every Trigger edge, rising or falling, must give
// exactly one glitch pulse of WIDTH_PS, starting at the edge; a steady
// Trigger gives none.
module tb_glitch_generator;
  localparam int W = 300;
  logic trigger = 1'b0, glitch;
  int checks = 0, failures = 0, n_pulses = 0;
  realtime t_rise, t_fall;
  bit done = 1'b0;

  glitch_generator dut (.*);

  always @(posedge glitch) begin n_pulses++; t_rise = $realtime; end
  always @(negedge glitch) t_fall = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  initial begin
    realtime t_edge;
    int hold;
    #2000;
    check(glitch == 1'b0, "idle glitch low");
    for (int i = 0; i < 40; i++) begin
      n_pulses = 0;
      t_edge = $realtime;
      trigger = ~trigger;
      #(W / 2);
      check(glitch == 1'b1, "glitch high inside the pulse");
      hold = W + 100 + int'($urandom_range(0, 3000));
      #(hold - W / 2);
      check(glitch == 1'b0, "glitch low after the pulse");
      check(n_pulses == 1, $sformatf("one pulse per edge, got %0d", n_pulses));
      check(t_rise == t_edge, "pulse starts at the edge");
      check(t_fall - t_rise == W, $sformatf("pulse width %0t", t_fall - t_rise));
    end
    n_pulses = 0;
    #10000;
    check(n_pulses == 0, "no pulse without an edge");
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
