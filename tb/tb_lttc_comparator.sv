`timescale 1ps/1ps
// tb_lttc_comparator: random input voltages around the reference; the output
// must be (vin > vref) once PD_PS has passed, and must keep its old value
// just out_old that.
module tb_lttc_comparator;
  localparam int PD = 300;
  real  vref = 1.05, vin = 0.0;
  logic out;
  int checks = 0, failures = 0;

  lttc_comparator dut (.*);

  initial begin
    logic out_old;
    vin = 0.5;
    #(2 * PD);
    for (int i = 0; i < 300; i++) begin
      out_old = out;
      vin = vref + (real'($urandom_range(0, 2000)) - 1000.0) * 1e-4;
      #(PD - 1);
      checks++;
      if (out !== out_old) begin failures++; $display("FAIL changed early"); end
      #2;
      checks++;
      if (out !== (vin > vref)) begin
        failures++;
        $display("FAIL vin=%f vref=%f out=%b", vin, vref, out);
      end
      #(PD);
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
