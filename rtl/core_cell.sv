// core_cell: 6-transistor SRAM core-cell, switch-level model in two-state logic.
//
// Two cross-coupled inverters hold one bit on the internal nodes Q and QB.
// Each access transistor joins an internal node to its bitline (Q to BL, QB to
// BLB) while the word line is high; both are rtranif1_sub substitutes, so the
// path works in both directions: on a read the cell pulls a precharged bitline
// down, on a write the write driver reaches through and overpowers the cell.
//
// Strengths decide who wins. The inverters drive their nodes with INV_STRENGTH
// (weak by default). A strong write driver arrives at Q lowered to pull by the
// resistive access switch and flips the cell; the cell arrives at the bitline
// lowered to medium and beats the small charge kept on a floating bitline.
//
// Timing: the node voltages of the latch are held in two flip-flops (q_r,
// qb_r) updated on each rising clk edge to the resolved value of their node.
// One clock is one evaluation step of the switch network: the cross-coupled
// inverters settle a one-sided write within two steps, a write from both
// bitlines within one. An unknown (conflicting) node keeps its old value.
// rst_n (active low, asynchronous) clears the cell to Q = 0, QB = 1.
//
// Interface: wl (word line), bl_env / blb_env (what the rest of each bitline
// drives), bl_drv / blb_drv (what the cell drives onto each bitline), q
// (stored bit, for observation).
//
// The structure (two inverters, two access transistors replaced by rtranif1
// substitutes) follows the described model; the strengths, the clocked
// evaluation and the reset value are choices of this model.
module core_cell
  import sram_pkg::*;
#(
  parameter strength_e INV_STRENGTH = S_WEAK
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wl,
  input  sig_t bl_env,
  input  sig_t blb_env,
  output sig_t bl_drv,
  output sig_t blb_drv,
  output logic q
);

  logic q_r, qb_r;
  sig_t inv_q, inv_qb;      // inverter outputs onto Q and QB
  sig_t acc_q, acc_qb;      // access switches onto Q and QB
  sig_t node_q, node_qb;    // resolved internal nodes

  assign inv_q  = sig(~qb_r, INV_STRENGTH);
  assign inv_qb = sig(~q_r, INV_STRENGTH);

  rtranif1_sub u_acc_bl (
    .ctrl (wl),
    .a_env(inv_q),
    .b_env(bl_env),
    .a_drv(acc_q),
    .b_drv(bl_drv)
  );

  rtranif1_sub u_acc_blb (
    .ctrl (wl),
    .a_env(inv_qb),
    .b_env(blb_env),
    .a_drv(acc_qb),
    .b_drv(blb_drv)
  );

  assign node_q  = resolve(inv_q, acc_q);
  assign node_qb = resolve(inv_qb, acc_qb);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_r  <= 1'b0;
      qb_r <= 1'b1;
    end else begin
      if (is_known(node_q.s, node_q.x))  q_r  <= node_q.v;
      if (is_known(node_qb.s, node_qb.x)) qb_r <= node_qb.v;
    end
  end

  assign q = q_r;

endmodule
