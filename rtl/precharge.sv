// precharge: bitline precharge and equaliser of the SRAM model.
//
// While pre_n is low, two PMOS pull-ups tie BL and BLB to the supply (a
// non-resistive MOS passes supply as strong), and an equaliser joins the two
// bitlines so that they settle to the same level. The equaliser is an
// rtranif0_sub, the substitute for the active-low resistive pass switch,
// sharing the pre_n control with the pull-ups. While pre_n is high the block
// drives nothing and the bitlines keep their charge.
//
// Interface: pre_n (active-low precharge), bl_env / blb_env (what the rest of
// each bitline drives, this block excluded), bl_drv / blb_drv (what this block
// drives onto each bitline). Timing: purely combinational.
//
// The pull-ups plus a tranif0 equaliser follow the described precharge
// sub-circuit; the pull-up strength (PU_STRENGTH, strong) is this model's
// choice.
module precharge
  import sram_pkg::*;
#(
  parameter strength_e PU_STRENGTH = S_STRONG
) (
  input  logic pre_n,
  input  sig_t bl_env,
  input  sig_t blb_env,
  output sig_t bl_drv,
  output sig_t blb_drv
);

  sig_t pu_bl, pu_blb;      // pull-up contributions
  sig_t eq_bl, eq_blb;      // equaliser contributions

  assign pu_bl  = pre_n ? SIG_Z : sig(1'b1, PU_STRENGTH);
  assign pu_blb = pre_n ? SIG_Z : sig(1'b1, PU_STRENGTH);

  // Each side of the equaliser sees everything on its bitline except the
  // equaliser itself: the rest of the net plus this block's pull-up.
  rtranif0_sub u_eq (
    .ctrl (pre_n),
    .a_env(resolve(bl_env, pu_bl)),
    .b_env(resolve(blb_env, pu_blb)),
    .a_drv(eq_bl),
    .b_drv(eq_blb)
  );

  assign bl_drv  = resolve(pu_bl, eq_bl);
  assign blb_drv = resolve(pu_blb, eq_blb);

endmodule
