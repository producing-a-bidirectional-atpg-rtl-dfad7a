// bitline_net: one bitline of the SRAM model as a resolved, charge-storing net.
//
// A bitline has three drivers (precharge, write driver, core-cell) and keeps
// its charge when none of them drives it, like a Verilog trireg. The stored
// charge (ch_r) is a further driver of CHARGE_STRENGTH (small by default),
// weaker than anything a live driver puts on the line.
//
// For each bidirectional driver (precharge, core-cell) the net returns its
// "environment": the resolution of all the other contributions, that driver's
// own excluded. The write driver only drives, so it gets none. Bidirectional devices
// forward the environment of one side to the other side, which keeps the
// switch network free of combinational loops. res is the value of the whole
// net, for readers such as the sense amplifier.
//
// Timing: ch_r takes the net's value on each rising clk edge when that value
// is known; an undriven or conflicting net keeps the old charge. rst_n
// (active low, asynchronous) sets the charge to 1, a precharged line.
module bitline_net
  import sram_pkg::*;
#(
  parameter strength_e CHARGE_STRENGTH = S_SMALL
) (
  input  logic clk,
  input  logic rst_n,
  input  sig_t pc_drv,
  input  sig_t wd_drv,
  input  sig_t cell_drv,
  output sig_t pc_env,
  output sig_t cell_env,
  output sig_t res
);

  logic ch_r;
  sig_t charge;

  assign charge   = sig(ch_r, CHARGE_STRENGTH);
  assign pc_env   = resolve(charge, resolve(wd_drv, cell_drv));
  assign cell_env = resolve(charge, resolve(pc_drv, wd_drv));
  assign res      = resolve(cell_env, cell_drv);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             ch_r <= 1'b1;
    else if (is_known(res.s, res.x)) ch_r <= res.v;
  end

endmodule
