`timescale 1ps/1ps
// tb_delay_cell: the output must follow each input edge after DELAY_PS and
// not before, for pulses longer than the delay.
module tb_delay_cell;
  localparam int D = 200;
  logic in = 1'b0, out;
  int checks = 0, failures = 0;
  bit done = 1'b0;

  delay_cell dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  initial begin
    int len;
    #1000;
    check(out == 1'b0, "idle");
    for (int i = 0; i < 50; i++) begin
      in = ~in;
      #(D - 1);
      check(out == ~in, "output must not change before the delay");
      #2;
      check(out == in, "output must follow after the delay");
      len = int'($urandom_range(D, 5 * D));
      #(len);
    end
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
