// tb_sram_1cell: end-to-end test of the reduced one-cell SRAM model.
//
// Runs the top at its default parameters through precharge, write and read
// operations in a random order and compares every sense-amplifier output with
// a one-bit reference memory kept here. Each operation is:
//   precharge : pre_n = 0 for one clock
//   write d   : wl = we = 1, din = d for one clock (cell_q must equal d after)
//   read      : precharge, then wl = sae = 1 for one clock; dout / doutb must
//               show the stored bit and its complement at strong strength
// Mechanisms counted (each must occur at least once): bitline precharge seen
// through the sense amplifier, the equaliser conducting, bitline charge held
// with every driver off, writes that flip the cell, writes of the same value,
// reads of 0 and of 1, and the sense amplifier's high-impedance outputs.
module tb_sram_1cell;
  import sram_pkg::*;

  int checks = 0, failures = 0;
  int n_precharge = 0, n_equalise = 0, n_hold = 0, n_flip = 0, n_same = 0;
  int n_read0 = 0, n_read1 = 0, n_hiz = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pre_n = 1'b1, wl = 1'b0, we = 1'b0, din = 1'b0, sae = 1'b0;
  sig_t dout, doutb;
  logic cell_q;
  logic ref_bit;

  sram_1cell dut (.clk(clk), .rst_n(rst_n), .pre_n(pre_n), .wl(wl), .we(we),
                  .din(din), .sae(sae), .dout(dout), .doutb(doutb), .cell_q(cell_q));

  always #5 clk = ~clk;

  function automatic sig_t strong_sig(input logic v);
    return '{s: S_STRONG, x: 1'b0, v: v};
  endfunction

  task automatic expect_sig(input sig_t got, input sig_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s t=%0t got=%p exp=%p", what, $time, got, exp);
    end
  endtask

  task automatic idle();
    pre_n = 1'b1; wl = 1'b0; we = 1'b0; sae = 1'b0;
  endtask

  task automatic do_precharge();
    pre_n = 1'b0;
    #1;
    if (dut.u_pc.eq_bl.s != S_HIGHZ && dut.u_pc.eq_blb.s != S_HIGHZ) n_equalise++;
    sae = 1'b1;
    #1;
    expect_sig(dout, strong_sig(1'b1), "precharged bl");
    expect_sig(doutb, strong_sig(1'b1), "precharged blb");
    if (dout == strong_sig(1'b1) && doutb == strong_sig(1'b1)) n_precharge++;
    @(posedge clk); #1;
    idle();
  endtask

  task automatic do_write(input logic d);
    wl = 1'b1; we = 1'b1; din = d;
    @(posedge clk); #1;
    if (d != ref_bit) n_flip++; else n_same++;
    ref_bit = d;
    checks++;
    if (cell_q !== d) begin
      failures++;
      $display("FAIL write %0b t=%0t cell_q=%0b", d, $time, cell_q);
    end
    idle();
  endtask

  task automatic do_read();
    do_precharge();
    wl = 1'b1; sae = 1'b1;
    #1;
    expect_sig(dout, strong_sig(ref_bit), "read dout");
    expect_sig(doutb, strong_sig(!ref_bit), "read doutb");
    if (ref_bit) n_read1++; else n_read0++;
    @(posedge clk); #1;
    expect_sig(dout, strong_sig(ref_bit), "read dout held");
    idle();
    #1;
    expect_sig(dout, SIG_Z, "sa disabled");
    expect_sig(doutb, SIG_Z, "sa disabled b");
    if (dout.s == S_HIGHZ) n_hiz++;
  endtask

  task automatic do_hold();
    do_precharge();
    repeat (3) @(posedge clk);
    sae = 1'b1;
    #1;
    expect_sig(dout, strong_sig(1'b1), "charge held bl");
    expect_sig(doutb, strong_sig(1'b1), "charge held blb");
    if (dout == strong_sig(1'b1) && doutb == strong_sig(1'b1)) n_hold++;
    idle();
  endtask

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", what);
    end
    $display("  %-22s %0d", what, n);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_bit = 1'b0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    do_read();
    do_write(1'b1);
    do_read();
    do_hold();
    do_write(1'b1);
    do_write(1'b0);
    do_read();
    for (int i = 0; i < 300; i++) begin
      case ($urandom_range(0, 3))
        0, 1: do_read();
        2:    do_write(1'($urandom_range(0, 1)));
        default: do_hold();
      endcase
    end
    need(n_precharge, "precharge");
    need(n_equalise, "equalise");
    need(n_hold, "charge held");
    need(n_flip, "write flips cell");
    need(n_same, "write same value");
    need(n_read0, "read 0");
    need(n_read1, "read 1");
    need(n_hiz, "sense amp highz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
