`timescale 1ps/1ps
// dldo_top: digital low-dropout regulator core with a glitch-driven coarse
// loop and a clocked fine stabilizer.
//
// The output node itself (output capacitor and load) is outside this module:
// vout is the sensed output voltage and i_pass the current the two PMOS
// arrays push into the node, so a testbench closes the loop by integrating
// (i_pass - i_load) on the output capacitor.
//
// Signal flow, as in the design's block diagram:
//   * an LTTC comparator gives UP_DN = (V_OUT > V_REF);
//   * the voltage range detector gives High, Low and Lock (Lock = 1 while
//     V_OUT is inside [V_REF_LOW, V_REF_HIGH]);
//   * the edge detector toggles Trigger on every High/Low transition;
//   * the fast adaptive response controller turns each Trigger transition
//     into a glitch that ripples down 16 flip-flops sampling UP_DN, which set
//     the 16 coarse switches (clockless coarse loop);
//   * the fine voltage stabilizer, clocked by clk (F_CLK), moves the 128 fine
//     switches while Lock is high (fine loop);
//   * both switch arrays feed V_OUT.
// rst (active high) keeps the coarse switches off and resets the fine code.
// Choices of this design that the block diagram leaves open (delays, switch
// conductances, reset behaviour) are stated in each sub-block.
module dldo_top #(
  parameter int unsigned N_FINE       = dldo_pkg::N_FINE,
  parameter int unsigned N_COARSE     = dldo_pkg::N_COARSE,
  parameter int unsigned MAX_STEP_EXP = dldo_pkg::MAX_STEP_EXP,
  parameter int unsigned FINE_INIT_ON = 0,
  parameter int unsigned CMP_PD_PS    = 300,      // comparator delay
  parameter int unsigned GLITCH_PS    = 300,      // glitch pulse width
  parameter int unsigned STAGE_PS     = 200,      // glitch chain stage delay
  parameter real         G_FINE       = 0.3125e-3, // S per fine switch
  parameter real         G_COARSE     = 40.0e-3,  // S per coarse switch
  localparam int unsigned CW          = $clog2(N_FINE + 1)
) (
  input  logic                clk,        // F_CLK of the fine loop
  input  logic                rst,
  input  real                 vdd,
  input  real                 vref,
  input  real                 vref_high,
  input  real                 vref_low,
  input  real                 vout,       // sensed output voltage
  output real                 i_pass,     // current into the output node
  output logic                up_dn,
  output logic                high,
  output logic                low,
  output logic                lock,
  output logic                trigger,
  output logic [N_COARSE-1:0] glitch,
  output logic [N_COARSE-1:0] c_sw,       // coarse gates, 0 = on
  output logic [N_FINE-1:0]   f_sw,       // fine gates, 0 = on
  output logic [CW-1:0]       fine_on,
  output logic [CW-1:0]       fine_step,
  output int unsigned         coarse_on
);
  real         i_fine, i_coarse;
  int unsigned fine_on_arr;

  lttc_comparator #(.PD_PS(CMP_PD_PS)) u_lttc (
    .vref(vref),
    .vin (vout),
    .out (up_dn)
  );

  voltage_range_detector #(.PD_PS(CMP_PD_PS)) u_range (
    .vref_high(vref_high),
    .vref_low (vref_low),
    .vout     (vout),
    .high     (high),
    .low      (low),
    .lock     (lock)
  );

  edge_detector u_edge (
    .high   (high),
    .low    (low),
    .trigger(trigger)
  );

  fast_adaptive_controller #(
    .N_COARSE (N_COARSE),
    .GLITCH_PS(GLITCH_PS),
    .STAGE_PS (STAGE_PS)
  ) u_coarse (
    .rst    (rst),
    .trigger(trigger),
    .up_dn  (up_dn),
    .c_sw   (c_sw),
    .glitch (glitch)
  );

  fine_voltage_stabilizer #(
    .N_FINE      (N_FINE),
    .MAX_STEP_EXP(MAX_STEP_EXP),
    .INIT_ON     (FINE_INIT_ON)
  ) u_fine (
    .clk  (clk),
    .rst  (rst),
    .up_dn(up_dn),
    .lock (lock),
    .f_sw (f_sw),
    .n_on (fine_on),
    .step (fine_step)
  );

  pmos_switch_array #(.N(N_FINE), .G_UNIT(G_FINE)) u_fine_array (
    .gate (f_sw),
    .vdd  (vdd),
    .vout (vout),
    .i_out(i_fine),
    .n_on (fine_on_arr)
  );

  pmos_switch_array #(.N(N_COARSE), .G_UNIT(G_COARSE)) u_coarse_array (
    .gate (c_sw),
    .vdd  (vdd),
    .vout (vout),
    .i_out(i_coarse),
    .n_on (coarse_on)
  );

  assign i_pass = i_fine + i_coarse;

  // The fine array and the fine code always agree.
  a_fine_count: assert property (@(posedge clk) disable iff (rst) fine_on_arr == int'(fine_on));
endmodule
