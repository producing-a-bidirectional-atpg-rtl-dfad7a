// sram_1cell: reduced one-cell SRAM memory model with ATPG-friendly switches.
//
// One 6T core-cell sits on one bitline pair (BL, BLB) together with a
// precharge/equaliser, a write driver and a sense amplifier. With a single
// cell there is no row or column decoder: the word line, precharge, write
// and sense controls are primary inputs. All bidirectional devices (the cell's
// access transistors and the precharge equaliser) are built from pairs of
// unidirectional resistive MOS switches, and the top has only input and output
// ports.
//
// Operations (one clk is one evaluation step of the switch network):
//   precharge : pre_n = 0                      -> BL = BLB = 1
//   write d   : pre_n = 1, wl = 1, we = 1, din = d for 1 cycle; the cell
//               holds d from the next rising edge on
//   read      : precharge for 1 cycle, then pre_n = 1, wl = 1, sae = 1;
//               dout = Q, doutb = QB in the same cycle (the cell beats the
//               bitline charge combinationally), the bitline charge follows
//               at the next edge
// dout / doutb are sram_pkg::sig_t values: S_HIGHZ while sae = 0, x set if
// the sensed bitline is unknown. cell_q shows the stored bit for debug.
// rst_n (active low, asynchronous) clears the cell and charges both bitlines.
//
// The set of sub-circuits, the tranif substitutes and the two-bufif1 sense
// amplifier follow the described model. The strength values, the clocked
// evaluation, the charge-holding bitlines, the control names and cell_q are
// this model's own choices.
module sram_1cell
  import sram_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic pre_n,
  input  logic wl,
  input  logic we,
  input  logic din,
  input  logic sae,
  output sig_t dout,
  output sig_t doutb,
  output logic cell_q
);

  sig_t pc_bl, pc_blb, wd_bl, wd_blb, cc_bl, cc_blb;
  sig_t pc_bl_env, pc_blb_env, cc_bl_env, cc_blb_env;
  sig_t bl, blb;

  bitline_net u_bl (
    .clk(clk), .rst_n(rst_n),
    .pc_drv(pc_bl), .wd_drv(wd_bl), .cell_drv(cc_bl),
    .pc_env(pc_bl_env), .cell_env(cc_bl_env), .res(bl)
  );

  bitline_net u_blb (
    .clk(clk), .rst_n(rst_n),
    .pc_drv(pc_blb), .wd_drv(wd_blb), .cell_drv(cc_blb),
    .pc_env(pc_blb_env), .cell_env(cc_blb_env), .res(blb)
  );

  precharge u_pc (
    .pre_n(pre_n),
    .bl_env(pc_bl_env), .blb_env(pc_blb_env),
    .bl_drv(pc_bl), .blb_drv(pc_blb)
  );

  write_driver u_wd (
    .we(we), .din(din),
    .bl_drv(wd_bl), .blb_drv(wd_blb)
  );

  core_cell u_cell (
    .clk(clk), .rst_n(rst_n), .wl(wl),
    .bl_env(cc_bl_env), .blb_env(cc_blb_env),
    .bl_drv(cc_bl), .blb_drv(cc_blb),
    .q(cell_q)
  );

  sense_amp u_sa (
    .sae(sae), .bl(bl), .blb(blb),
    .out(dout), .outb(doutb)
  );

endmodule
