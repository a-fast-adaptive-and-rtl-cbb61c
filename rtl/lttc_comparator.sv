`timescale 1ps/1ps
// lttc_comparator: behavioural model of the clockless logic-threshold
// trigger comparator (LTTC). In silicon it is analog: an inverter biased at
// the reference by a diode-connected pair, two inverters whose PMOS sources
// sit on the sensed voltage, a buffer and a keeper latch. Only its decision
// and its delay are modelled here; it is not synthesizable.
//
// out is 1 when vin is above vref and 0 when it is below. The polarity
// follows the regulator's waveform, where UP_DN falls when V_OUT droops below
// V_REF. The output changes PD_PS picoseconds after the crossing; the
// continuous assignment makes the delay inertial, so a crossing shorter than
// PD_PS is not seen, standing in for the comparator's finite bandwidth. The
// delay and the absence of hysteresis are this model's choices. No clock.
module lttc_comparator #(
  parameter int unsigned PD_PS = 300   // propagation delay
) (
  input  real  vref,   // reference (V_REF, V_REF_HIGH or V_REF_LOW)
  input  real  vin,    // sensed voltage (V_OUT)
  output logic out
);
  assign #(PD_PS) out = (vin > vref);
endmodule
