// rtranif1_sub: substitute for the rtranif1 (resistive, active-high) pass switch.
//
// Built like rtranif0_sub but from two RnMOS switches: with the shared control
// input high, terminal A is carried to B and B to A, each lowered one strength
// step; with it low both directions are undriven. The SRAM core-cell uses it
// for its two access transistors, gated by the word line.
//
// Interface: ctrl (1 = closed), a_env / b_env (what the rest of each net
// drives), a_drv / b_drv (what this switch drives onto each net).
// Timing: purely combinational.
module rtranif1_sub
  import sram_pkg::*;
(
  input  logic ctrl,
  input  sig_t a_env,
  input  sig_t b_env,
  output sig_t a_drv,
  output sig_t b_drv
);

  rmos_switch #(.P_TYPE(1'b0)) u_a_to_b (.gate(ctrl), .src(a_env), .drn(b_drv));
  rmos_switch #(.P_TYPE(1'b0)) u_b_to_a (.gate(ctrl), .src(b_env), .drn(a_drv));

endmodule
