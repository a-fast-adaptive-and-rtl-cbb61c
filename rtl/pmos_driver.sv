`timescale 1ps/1ps
// pmos_driver: gate drivers of the segmented coarse PMOS array.
//
// While RST is high every gate is held at the OFF level, so no coarse switch
// conducts during start-up whatever the controller flip-flops hold. Once RST
// is released each gate follows its flip-flop: a 0 turns the PMOS on. That
// the driver keeps the switches off at start-up and then follows the
// controller is as the design describes; realising it as one OR gate per
// switch is this design's choice. Combinational.
module pmos_driver #(
  parameter int unsigned WIDTH = dldo_pkg::N_COARSE
) (
  input  logic             rst,
  input  logic [WIDTH-1:0] ctrl,   // flip-flop outputs, 0 = switch on
  output logic [WIDTH-1:0] gate    // PMOS gates, 0 = switch on
);
  always_comb begin
    for (int i = 0; i < WIDTH; i++)
      gate[i] = rst ? dldo_pkg::GATE_OFF : ctrl[i];
  end
endmodule
