// tb_core_cell: self-checking test of the 6T core-cell.
// Bitline environments are driven directly. Checked: reset state; the word
// line isolates the cell; a strong differential write flips it in one clock;
// a one-sided write settles both nodes within two clocks; a read puts the
// stored value and its complement on the bitlines at medium strength without
// disturbing the cell; drivers weaker than the write driver cannot flip it.
module tb_core_cell;
  import sram_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, wl = 1'b0;
  sig_t bl_env, blb_env, bl_drv, blb_drv;
  logic q;

  localparam sig_t Z = '{s: S_HIGHZ, x: 1'b0, v: 1'b0};

  core_cell dut (.clk(clk), .rst_n(rst_n), .wl(wl), .bl_env(bl_env), .blb_env(blb_env),
                 .bl_drv(bl_drv), .blb_drv(blb_drv), .q(q));

  always #5 clk = ~clk;

  function automatic sig_t s(input logic v, input strength_e st);
    return '{s: st, x: 1'b0, v: v};
  endfunction

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0b exp=%0b", what, got, exp);
    end
  endtask

  task automatic expect_sig(input sig_t got, input sig_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%p exp=%p", what, got, exp);
    end
  endtask

  // read: precharged (small 1) bitlines, word line on for n clocks
  task automatic do_read(input logic exp);
    wl = 1'b1; bl_env = s(1'b1, S_SMALL); blb_env = s(1'b1, S_SMALL);
    #1;
    expect_sig(bl_drv,  s(exp, S_MEDIUM),  "read bl");
    expect_sig(blb_drv, s(!exp, S_MEDIUM), "read blb");
    repeat (3) @(posedge clk);
    #1;
    expect_bit(q, exp, "read is non-destructive");
    wl = 1'b0; bl_env = Z; blb_env = Z;
  endtask

  task automatic do_write(input logic d);
    wl = 1'b1; bl_env = s(d, S_STRONG); blb_env = s(!d, S_STRONG);
    @(posedge clk); #1;
    expect_bit(q, d, "write in one clock");
    wl = 1'b0; bl_env = Z; blb_env = Z;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bl_env = Z; blb_env = Z;
    #12 rst_n = 1'b1;
    expect_bit(q, 1'b0, "reset");
    do_read(1'b0);
    // word line low: strong bitlines do not reach the cell
    bl_env = s(1'b1, S_STRONG); blb_env = s(1'b0, S_STRONG);
    #1;
    expect_sig(bl_drv, Z, "isolated bl");
    expect_sig(blb_drv, Z, "isolated blb");
    repeat (2) @(posedge clk); #1;
    expect_bit(q, 1'b0, "no write without word line");
    do_write(1'b1);
    do_read(1'b1);
    do_write(1'b0);
    do_read(1'b0);
    // one-sided write: only BLB driven low, BL floating
    wl = 1'b1; bl_env = Z; blb_env = s(1'b0, S_STRONG);
    repeat (2) @(posedge clk); #1;
    wl = 1'b0; blb_env = Z;
    expect_bit(q, 1'b1, "one-sided write");
    do_read(1'b1);
    // a pull-strength driver arrives at weak, equal to the inverter: no flip
    wl = 1'b1; bl_env = s(1'b0, S_PULL); blb_env = s(1'b1, S_PULL);
    repeat (3) @(posedge clk); #1;
    wl = 1'b0; bl_env = Z; blb_env = Z;
    expect_bit(q, 1'b1, "pull driver cannot flip");
    do_read(1'b1);
    // random write / read sequence
    for (int i = 0; i < 40; i++) begin
      logic d;
      d = 1'($urandom_range(0, 1));
      do_write(d);
      do_read(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
