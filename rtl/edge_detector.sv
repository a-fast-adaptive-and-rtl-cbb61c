`timescale 1ps/1ps
// edge_detector: turns range-detector transitions into the Trigger signal.
//
// Trigger changes level on every transition of High or of Low, in either
// direction. Because V_REF_HIGH lies above V_REF_LOW, High and Low never
// switch at the same instant, so the exclusive-NOR of the two toggles exactly
// once per transition of either input. The inversion makes Trigger low while
// V_OUT is inside the window (High = 0, Low = 1) and high while it is outside,
// which is how the regulator's operational waveform draws it. The glitch
// generator downstream converts each Trigger transition into a pulse.
// Purely combinational, no clock.
module edge_detector (
  input  logic high,     // 1 when V_OUT is above V_REF_HIGH
  input  logic low,      // 1 when V_OUT is above V_REF_LOW
  output logic trigger
);
  assign trigger = ~(high ^ low);
endmodule
