`timescale 1ps/1ps
// dldo_pkg: sizes shared by the digital LDO controller.
//
// The fine loop drives 128 unit PMOS switches and the coarse loop drives 16
// segmented PMOS switches; both numbers follow the block diagram of the
// regulator. The fine stabilizer's largest step is 8 switches (its step grows
// 1, 2, 4, 8), so the step exponent saturates at 3. The switch gate encoding
// is shared by every block: a gate level of 0 turns a PMOS switch on.
package dldo_pkg;
  localparam int unsigned N_FINE       = 128;  // fine switch array, F_SW[128]
  localparam int unsigned N_COARSE     = 16;   // coarse switch array, C_SW[16]
  localparam int unsigned MAX_STEP_EXP = 3;    // fine step 2**3 = 8 at most
  localparam logic        GATE_ON      = 1'b0; // PMOS conducts with a low gate
  localparam logic        GATE_OFF     = 1'b1;
endpackage
