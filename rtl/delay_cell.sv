`timescale 1ps/1ps
// delay_cell: behavioural model of one analog delay element (an inverter
// chain in silicon). It is not synthesizable logic; only its delay matters.
// Synthesis reduces it to a wire, so a netlist places a hard, dont-touch
// delay cell here instead.
//
// The output follows the input after DELAY_PS picoseconds. The delay is
// inertial, as a continuous assignment with a delay is in SystemVerilog: an
// input pulse shorter than DELAY_PS is swallowed. The glitch chain of the
// coarse controller therefore keeps its stage delay below the glitch width.
// The delay value is this model's own choice; the design only names the
// element.
module delay_cell #(
  parameter int unsigned DELAY_PS = 200
) (
  input  logic in,
  output logic out
);
  assign #(DELAY_PS) out = in;
endmodule
