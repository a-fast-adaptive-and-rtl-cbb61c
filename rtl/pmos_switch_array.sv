`timescale 1ps/1ps
// pmos_switch_array: behavioural model of a segmented PMOS pass-device
// array between VDD and V_OUT. Not synthesizable: it is the analog power
// stage.
//
// Each of the N switches whose gate is 0 conducts as a resistor of
// conductance G_UNIT siemens (a PMOS in its linear region at low dropout),
// so the array sources i_out = (switches on) * G_UNIT * (vdd - vout) into
// the output node, and nothing when vout is above vdd. The regulator uses
// one array of 128 unit switches for the fine loop and one of 16 larger
// switches for the coarse loop; the switch counts follow the design, while
// the linear conductance model and the G_UNIT values are this model's own.
// Combinational.
module pmos_switch_array #(
  parameter int unsigned N      = 16,
  parameter real         G_UNIT = 0.04   // siemens per switch
) (
  input  logic [N-1:0] gate,    // 0 = switch on
  input  real          vdd,
  input  real          vout,
  output real          i_out,   // amperes into the output node
  output int unsigned  n_on
);
  always_comb begin
    n_on = 0;
    for (int i = 0; i < N; i++)
      if (gate[i] == 1'b0) n_on = n_on + 1;
    i_out = (vdd > vout) ? real'(n_on) * G_UNIT * (vdd - vout) : 0.0;
  end
endmodule
