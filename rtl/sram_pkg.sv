// sram_pkg: shared types and strength arithmetic for the switch-level SRAM model.
//
// The model represents every node of the one-cell SRAM (bitlines, cell nodes)
// as a value carrying a Verilog-style drive strength, so that the analog
// "who overpowers whom" behaviour of a memory cell (write driver beats the cell,
// the cell beats the precharged bitline charge) can be expressed in plain
// two-state synthesizable logic. A node value is a `sig_t`: a strength level
// (the eight levels of the Verilog strength scale, highz to supply), a logic
// value and an "unknown" flag that is set when two equal-strength drivers
// disagree.
//
// Functions:
//   sig()          build a driven value
//   resolve()      wired resolution of two contributions: the stronger wins,
//                  equal strengths with different values give unknown
//   rmos_reduce()  strength loss through a resistive MOS switch (rpmos/rnmos,
//                  IEEE 1364 reduction table: supply,strong->pull, pull->weak,
//                  large,weak->medium, medium,small->small)
//   mos_pass()     strength through a non-resistive MOS switch (supply->strong)
//
// The strength scale and the reduction rules are the Verilog ones; the
// resolution of ambiguous strength ranges is simplified to one strength per
// node, which is this model's own choice.
package sram_pkg;

  typedef enum logic [2:0] {
    S_HIGHZ  = 3'd0,
    S_SMALL  = 3'd1,
    S_MEDIUM = 3'd2,
    S_WEAK   = 3'd3,
    S_LARGE  = 3'd4,
    S_PULL   = 3'd5,
    S_STRONG = 3'd6,
    S_SUPPLY = 3'd7
  } strength_e;

  typedef struct packed {
    strength_e s;  // drive strength, S_HIGHZ = not driven
    logic      x;  // unknown (equal-strength conflict)
    logic      v;  // logic value, meaningful when s != S_HIGHZ and !x
  } sig_t;

  localparam sig_t SIG_Z = '{s: S_HIGHZ, x: 1'b0, v: 1'b0};

  function automatic sig_t sig(input logic v, input strength_e s);
    sig_t r;
    r.s = s;
    r.x = 1'b0;
    r.v = (s == S_HIGHZ) ? 1'b0 : v;
    return r;
  endfunction

  function automatic sig_t resolve(input sig_t a, input sig_t b);
    sig_t r;
    if (a.s > b.s)      r = a;
    else if (b.s > a.s) r = b;
    else if (a.s == S_HIGHZ) r = SIG_Z;
    else begin
      r.s = a.s;
      r.x = a.x | b.x | (a.v != b.v);
      r.v = r.x ? 1'b0 : a.v;
    end
    return r;
  endfunction

  function automatic strength_e rmos_strength(input strength_e s);
    case (s)
      S_SUPPLY, S_STRONG: return S_PULL;
      S_PULL:             return S_WEAK;
      S_LARGE, S_WEAK:    return S_MEDIUM;
      S_MEDIUM, S_SMALL:  return S_SMALL;
      default:            return S_HIGHZ;
    endcase
  endfunction

  function automatic sig_t rmos_reduce(input sig_t a);
    sig_t r;
    r   = a;
    r.s = rmos_strength(a.s);
    return r;
  endfunction

  function automatic sig_t mos_pass(input sig_t a);
    sig_t r;
    r = a;
    if (a.s == S_SUPPLY) r.s = S_STRONG;
    return r;
  endfunction

  // True when the node carries a known logic value.
  function automatic logic is_known(input strength_e s, input logic x);
    return (s != S_HIGHZ) && !x;
  endfunction

endpackage
