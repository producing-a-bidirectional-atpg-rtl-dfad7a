// rmos_switch: one digital resistive MOS transistor (RpMOS or RnMOS).
//
// A resistive MOS primitive is a unidirectional switch: while its gate turns
// it on, the value on its source appears on its drain with the strength
// lowered one step by the resistive-device table (supply,strong->pull,
// pull->weak, large,weak->medium, medium,small->small); while it is off the
// drain is undriven (highz). P_TYPE = 1 gives an RpMOS, on while the gate is 0;
// P_TYPE = 0 gives an RnMOS, on while the gate is 1.
//
// Interface: gate (logic), src (sram_pkg::sig_t, the value seen on the source
// side), drn (sig_t, what the switch drives onto the drain side).
// Timing: purely combinational.
//
// Two of these, facing opposite ways, make up the tranif substitutes of the
// SRAM model; the strength table is the Verilog one.
module rmos_switch
  import sram_pkg::*;
#(
  parameter bit P_TYPE = 1'b1
) (
  input  logic gate,
  input  sig_t src,
  output sig_t drn
);

  logic on;

  assign on  = P_TYPE ? ~gate : gate;
  assign drn = on ? rmos_reduce(src) : SIG_Z;

endmodule
