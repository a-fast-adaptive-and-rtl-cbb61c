`timescale 1ps/1ps
// voltage_range_detector: behavioural model of the window comparator that
// tells whether V_OUT lies between V_REF_LOW and V_REF_HIGH. Not
// synthesizable: its two comparators are analog LTTC stages.
//
// high = V_OUT above V_REF_HIGH, low = V_OUT above V_REF_LOW, and
// lock = high XOR low, which is 1 exactly while V_OUT is inside the window.
// Two comparators and an XOR gate producing High, Low and Lock are as the
// design draws them; the comparator polarity (1 above the threshold) and
// delay are this model's choices, picked so that Low is high in steady state
// and falls during a droop, as in the regulator's waveform. No clock; lock
// follows the comparators with no further delay.
module voltage_range_detector #(
  parameter int unsigned PD_PS = 300
) (
  input  real  vref_high,
  input  real  vref_low,
  input  real  vout,
  output logic high,
  output logic low,
  output logic lock
);
  lttc_comparator #(.PD_PS(PD_PS)) u_cmp_high (
    .vref(vref_high),
    .vin (vout),
    .out (high)
  );

  lttc_comparator #(.PD_PS(PD_PS)) u_cmp_low (
    .vref(vref_low),
    .vin (vout),
    .out (low)
  );

  assign lock = high ^ low;
endmodule
