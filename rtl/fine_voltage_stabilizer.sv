`timescale 1ps/1ps
// fine_voltage_stabilizer: clocked fine loop of the regulator.
//
// The block keeps a count of how many of the N_FINE unit PMOS switches are on
// and drives them as a thermometer code: switch i is on (gate 0) when i is
// below the count. Each rising edge of clk it does what the design's flow
// chart says:
//   * Lock low (V_OUT outside the window, coarse loop in charge): the count is
//     held and the step counter is reset.
//   * Lock high, UP_DN equal to its value on the previous edge (stable for two
//     cycles): the count moves by 2**k switches and k grows by one, so a run
//     of stable cycles moves it by 1, 2, 4, 8, 8, ...; k saturates at
//     MAX_STEP_EXP.
//   * Lock high, UP_DN changed (or no previous sample since the counter was
//     reset): the count moves by one switch and k is cleared.
// UP_DN = 0 (V_OUT below V_REF) adds switches, UP_DN = 1 removes them; the
// count saturates at 0 and N_FINE.
//
// From the design: the 128-switch array, the Lock test, the two-cycle
// stability test and the 1-2-4-8 step sequence. Choices of this design: the
// count is held while Lock is low; the count starts at INIT_ON after reset;
// UP_DN and Lock are sampled directly on clk (the comparator ends in a latch
// and no synchronizer is described); rst is asynchronous and active high.
// Timing: the count and the gates change one clock after the sample.
module fine_voltage_stabilizer #(
  parameter int unsigned N_FINE       = dldo_pkg::N_FINE,
  parameter int unsigned MAX_STEP_EXP = dldo_pkg::MAX_STEP_EXP,
  parameter int unsigned INIT_ON      = 0,
  localparam int unsigned CW          = $clog2(N_FINE + 1),
  localparam int unsigned KW          = $clog2(MAX_STEP_EXP + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              up_dn,
  input  logic              lock,
  output logic [N_FINE-1:0] f_sw,     // fine PMOS gates, 0 = on
  output logic [CW-1:0]     n_on,     // switches currently on
  output logic [CW-1:0]     step      // step taken on the last active edge
);
  logic          up_dn_prev;
  logic          have_prev;
  logic [KW-1:0] k;

  logic          stable;
  logic [CW-1:0] step_now;
  logic [CW:0]   sum_up;     // one extra bit for the saturation test

  always_comb begin
    stable   = have_prev && (up_dn == up_dn_prev);
    step_now = stable ? CW'(1) << k : CW'(1);
    sum_up   = {1'b0, n_on} + {1'b0, step_now};
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      n_on       <= CW'(INIT_ON);
      k          <= '0;
      have_prev  <= 1'b0;
      up_dn_prev <= 1'b0;
      step       <= '0;
    end else if (!lock) begin
      k          <= '0;
      have_prev  <= 1'b0;
      step       <= '0;
    end else begin
      have_prev  <= 1'b1;
      up_dn_prev <= up_dn;
      step       <= step_now;
      if (stable) k <= (k == KW'(MAX_STEP_EXP)) ? k : k + KW'(1);
      else        k <= '0;
      if (!up_dn) n_on <= (sum_up > (CW+1)'(N_FINE)) ? CW'(N_FINE) : sum_up[CW-1:0];
      else        n_on <= (n_on < step_now) ? '0 : n_on - step_now;
    end
  end

  always_comb begin
    for (int i = 0; i < N_FINE; i++)
      f_sw[i] = (CW'(i) < n_on) ? dldo_pkg::GATE_ON : dldo_pkg::GATE_OFF;
  end

  // The count never leaves its range.
  a_range: assert property (@(posedge clk) disable iff (rst) n_on <= CW'(N_FINE));
endmodule
