// rtranif0_sub: substitute for the rtranif0 (resistive, active-low) pass switch.
//
// A tranif primitive is bidirectional, which test-generation tools do not
// accept. This module rebuilds it from two unidirectional RpMOS switches that
// share the control input and face opposite ways: one carries terminal A to
// terminal B, the other B to A. Each carries what the rest of its source net
// drives, lowered one strength step, so a strong driver on one side still
// beats a weak one on the other, as in the resistive primitive.
//
// Bidirectional terminals are split into two signals each: a_env / b_env is
// what everything else on that net drives (this module excluded), a_drv /
// b_drv is what this module drives onto the net. The net itself resolves all
// contributions. ctrl = 0 closes the switch, ctrl = 1 opens it.
// Timing: purely combinational.
module rtranif0_sub
  import sram_pkg::*;
(
  input  logic ctrl,
  input  sig_t a_env,
  input  sig_t b_env,
  output sig_t a_drv,
  output sig_t b_drv
);

  rmos_switch #(.P_TYPE(1'b1)) u_a_to_b (.gate(ctrl), .src(a_env), .drn(b_drv));
  rmos_switch #(.P_TYPE(1'b1)) u_b_to_a (.gate(ctrl), .src(b_env), .drn(a_drv));

endmodule
