// write_driver: bitline write driver of the SRAM model.
//
// While we is high it forces din on BL and ~din on BLB at WD_STRENGTH (strong
// by default); while we is low it drives nothing. Through the resistive access
// switches of the core-cell the strong drive arrives at the cell nodes as pull,
// which beats the cell's weak inverters and so writes the bit.
//
// Interface: we (write enable), din (data), bl_drv / blb_drv (sram_pkg::sig_t,
// what the driver puts on each bitline). Timing: combinational.
//
// Only the function of the write driver is described; the tri-state
// complementary driver and its strength are this model's choice.
module write_driver
  import sram_pkg::*;
#(
  parameter strength_e WD_STRENGTH = S_STRONG
) (
  input  logic we,
  input  logic din,
  output sig_t bl_drv,
  output sig_t blb_drv
);

  assign bl_drv  = we ? sig(din, WD_STRENGTH)  : SIG_Z;
  assign blb_drv = we ? sig(~din, WD_STRENGTH) : SIG_Z;

endmodule
