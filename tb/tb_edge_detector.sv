`timescale 1ps/1ps
// tb_edge_detector: drives High and Low as a voltage sweeping up and down
// through the window would (Low rises before High on the way up and falls
// after it on the way down) and checks that Trigger changes once for every
// transition of either input, and is low inside the window.
module tb_edge_detector;
  logic high = 1'b0, low = 1'b1, trigger;
  int checks = 0, failures = 0;

  edge_detector dut (.*);

  // region 0: below the window, 1: inside, 2: above
  function automatic logic [1:0] hl(input int r);
    return (r == 0) ? 2'b00 : (r == 1) ? 2'b01 : 2'b11;
  endfunction

  initial begin
    int r = 1, nr;
    logic t_prev;
    #10;
    checks++;
    if (trigger !== 1'b0) begin failures++; $display("FAIL trigger high inside window"); end
    for (int i = 0; i < 500; i++) begin
      t_prev = trigger;
      nr = (r == 0) ? 1 : (r == 2) ? 1 : ($urandom_range(0, 1) ? 0 : 2);
      {high, low} = hl(nr);
      #10;
      checks++;
      if (trigger !== ~t_prev) begin
        failures++;
        $display("FAIL no toggle %0d->%0d", r, nr);
      end
      checks++;
      if (trigger !== (nr != 1)) begin
        failures++;
        $display("FAIL level in region %0d", nr);
      end
      r = nr;
      // no change in inputs: no change in trigger
      t_prev = trigger;
      #10;
      checks++;
      if (trigger !== t_prev) begin failures++; $display("FAIL spurious toggle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
