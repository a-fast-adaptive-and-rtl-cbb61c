`timescale 1ps/1ps
// glitch_generator: clockless pulse generator of the coarse loop.
//
// Every transition of Trigger, rising or falling, produces one positive pulse
// of fixed width on glitch. The pulse is the XOR of Trigger with a copy of
// itself delayed by WIDTH_PS, so its width is set by one delay element and
// does not depend on how long Trigger stays at either level. That a pulse
// follows both edges of Trigger matches the operational waveform of the
// regulator; the XOR-with-delayed-copy circuit is this design's choice, the
// design only states the pulse is short and of fixed width.
//
// The delay element is a behavioural model; synthesis drops its delay and
// then folds the XOR to 0, so a netlist needs a hard delay cell there.
//
// Timing: glitch rises one gate delay after a Trigger edge (zero in this
// model) and falls WIDTH_PS later. Trigger must stay at each level longer
// than WIDTH_PS, or pulses merge.
module glitch_generator #(
  parameter int unsigned WIDTH_PS = 300
) (
  input  logic trigger,
  output logic glitch
);
  logic trigger_dly;

  delay_cell #(.DELAY_PS(WIDTH_PS)) u_width (
    .in (trigger),
    .out(trigger_dly)
  );

  assign glitch = trigger ^ trigger_dly;
endmodule
