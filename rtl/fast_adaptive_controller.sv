`timescale 1ps/1ps
// fast_adaptive_controller: glitch-driven coarse loop of the regulator.
//
// A glitch generator turns every Trigger transition into a short pulse,
// glitch[0]. The pulse runs down a chain of N_COARSE-1 delay cells, giving
// glitch[1] .. glitch[N_COARSE-1], and each glitch[i] clocks flip-flop i,
// which samples UP_DN. Flip-flop i drives coarse switch i through a PMOS
// driver; a 0 on UP_DN (V_OUT below V_REF) turns the switch on. Since the
// flip-flops sample UP_DN one after another, the number of switches that
// change follows how long UP_DN keeps its level while the pulse travels:
// during a droop every stage sees UP_DN low and the whole array turns on,
// while on the way back into range the later stages may already see V_OUT
// above V_REF and turn their switches off. There is no clock.
//
// The structure (glitch generator, delay chain, one D flip-flop sampling
// UP_DN and one PMOS driver per switch, 16 switches) follows the design.
// Choices of this design: N_COARSE flip-flops take N_COARSE glitches, so the
// chain has N_COARSE-1 delay cells; the flip-flops are asynchronously set
// by RST to the OFF level, so the array stays off after RST is released until
// the first glitch, in addition to the PMOS drivers holding every gate OFF as
// long as RST is high. STAGE_PS must stay below GLITCH_PS, since
// the delay cells are inertial.
//
// The delay cells are behavioural. A synthesis tool drops their delays, after
// which the glitch generator folds to a constant and the flip-flops vanish;
// in silicon the delay cells are hand-placed delay elements kept out of
// logic optimisation.
//
// Interface: rst (active high), trigger from the edge detector, up_dn from
// the comparator; c_sw[i] is the gate of coarse switch i (0 = on) and
// glitch[i] the clock of flip-flop i, brought out for observation.
module fast_adaptive_controller #(
  parameter int unsigned N_COARSE  = dldo_pkg::N_COARSE,
  parameter int unsigned GLITCH_PS = 300,   // glitch pulse width
  parameter int unsigned STAGE_PS  = 200    // delay between glitch[i] and glitch[i+1]
) (
  input  logic                rst,
  input  logic                trigger,
  input  logic                up_dn,
  output logic [N_COARSE-1:0] c_sw,
  output logic [N_COARSE-1:0] glitch
);
  logic [N_COARSE-1:0] q;

  // An inertial delay cell would swallow a glitch narrower than itself.
  if (STAGE_PS >= GLITCH_PS) begin : g_bad_timing
    $error("fast_adaptive_controller: STAGE_PS must be below GLITCH_PS");
  end

  glitch_generator #(.WIDTH_PS(GLITCH_PS)) u_glitch (
    .trigger(trigger),
    .glitch (glitch[0])
  );

  for (genvar i = 1; i < N_COARSE; i++) begin : g_chain
    delay_cell #(.DELAY_PS(STAGE_PS)) u_delay (
      .in (glitch[i-1]),
      .out(glitch[i])
    );
  end

  for (genvar i = 0; i < N_COARSE; i++) begin : g_dff
    logic q_r;
    always_ff @(posedge glitch[i] or posedge rst) begin
      if (rst) q_r <= dldo_pkg::GATE_OFF;
      else     q_r <= up_dn;
    end
    assign q[i] = q_r;
  end

  pmos_driver #(.WIDTH(N_COARSE)) u_driver (
    .rst (rst),
    .ctrl(q),
    .gate(c_sw)
  );
endmodule
