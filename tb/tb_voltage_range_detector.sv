`timescale 1ps/1ps
// tb_voltage_range_detector: sweeps V_OUT below, inside and above the window
// and checks High, Low and Lock after the comparator delay.
module tb_voltage_range_detector;
  localparam int PD = 300;
  real  vref_high = 1.08, vref_low = 1.02, vout = 1.05;
  logic high, low, lock;
  int checks = 0, failures = 0;

  voltage_range_detector dut (.*);

  initial begin
    bit e_high, e_low;
    for (int i = 0; i < 400; i++) begin
      vout = 0.95 + real'($urandom_range(0, 2000)) * 1e-4;
      #(PD + 10);
      e_high = vout > vref_high;
      e_low  = vout > vref_low;
      checks++;
      if (high !== e_high || low !== e_low || lock !== (e_low && !e_high)) begin
        failures++;
        $display("FAIL vout=%f high=%b low=%b lock=%b", vout, high, low, lock);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
