`timescale 1ps/1ps
// tb_pmos_driver: with RST high every gate must be off (1) whatever the
// flip-flops hold; with RST low each gate must equal its control bit.
module tb_pmos_driver;
  localparam int W = 16;
  logic rst = 1'b1;
  logic [W-1:0] ctrl = '0, gate;
  int checks = 0, failures = 0;

  pmos_driver dut (.*);

  initial begin
    for (int i = 0; i < 400; i++) begin
      rst  = 1'($urandom_range(0, 1));
      ctrl = W'($urandom);
      #10;
      checks++;
      if (gate != (rst ? {W{1'b1}} : ctrl)) begin
        failures++;
        $display("FAIL rst=%b ctrl=%h gate=%h", rst, ctrl, gate);
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
