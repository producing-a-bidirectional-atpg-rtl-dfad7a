// sense_amp: digital sense amplifier of the SRAM model.
//
// In two-valued logic there is no small bitline swing to amplify, so the
// sense amplifier reduces to two tri-state buffers (bufif1): while sae is high,
// out follows BL and outb follows BLB, driven at OUT_STRENGTH; while sae is low
// both outputs are undriven (highz). A bitline that is undriven or unknown
// gives an unknown output, as a bufif1 does.
//
// Interface: sae (sense enable), bl / blb (resolved bitline values), out /
// outb (sram_pkg::sig_t; s = S_HIGHZ when disabled). Timing: combinational.
//
// The two-bufif1 structure follows the described model; the output strength
// is this model's choice.
module sense_amp
  import sram_pkg::*;
#(
  parameter strength_e OUT_STRENGTH = S_STRONG
) (
  input  logic sae,
  input  sig_t bl,
  input  sig_t blb,
  output sig_t out,
  output sig_t outb
);

  function automatic sig_t tri_buf(input logic en, input sig_t d);
    sig_t r;
    if (!en) r = SIG_Z;
    else begin
      r.s = OUT_STRENGTH;
      r.x = !is_known(d.s, d.x);
      r.v = is_known(d.s, d.x) ? d.v : 1'b0;
    end
    return r;
  endfunction

  assign out  = tri_buf(sae, bl);
  assign outb = tri_buf(sae, blb);

endmodule
