`timescale 1ps/1ps
// tb_pmos_switch_array: random gate patterns and voltages; the current must
// be (number of low gates) * G_UNIT * (vdd - vout), and zero when vout is
// above vdd.
module tb_pmos_switch_array;
  localparam int  N = 16;
  localparam real G = 0.04;
  logic [N-1:0] gate = '1;
  real vdd = 1.2, vout = 1.15, i_out;
  int unsigned n_on;
  int checks = 0, failures = 0;

  pmos_switch_array dut (.*);

  initial begin
    int  k;
    real e;
    for (int i = 0; i < 400; i++) begin
      gate = N'($urandom);
      vdd  = 0.6 + real'($urandom_range(0, 600)) * 1e-3;
      vout = real'($urandom_range(0, 1300)) * 1e-3;
      #10;
      k = 0;
      for (int b = 0; b < N; b++) if (!gate[b]) k++;
      e = (vdd > vout) ? k * G * (vdd - vout) : 0.0;
      checks++;
      if (n_on != k || i_out > e + 1e-12 || i_out < e - 1e-12) begin
        failures++;
        $display("FAIL gate=%h vdd=%f vout=%f i=%g exp=%g", gate, vdd, vout, i_out, e);
      end
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
