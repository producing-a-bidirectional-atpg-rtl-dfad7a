// tb_precharge: self-checking test of the precharge / equaliser block.
// dut drives both bitlines high at strong while pre_n = 0 and nothing while
// pre_n = 1. A second instance with its pull-ups disabled (highz strength)
// isolates the equaliser: a driver on one bitline must reach the other one
// lowered to the resistive strength, in both directions, only while pre_n = 0.
module tb_precharge;
  import sram_pkg::*;

  int checks = 0, failures = 0;
  logic pre_n;
  sig_t bl_env, blb_env, bl_drv, blb_drv, eq_bl, eq_blb;

  localparam sig_t Z  = '{s: S_HIGHZ, x: 1'b0, v: 1'b0};
  localparam sig_t S1 = '{s: S_STRONG, x: 1'b0, v: 1'b1};

  precharge dut (.pre_n(pre_n), .bl_env(bl_env), .blb_env(blb_env),
                 .bl_drv(bl_drv), .blb_drv(blb_drv));
  precharge #(.PU_STRENGTH(S_HIGHZ)) dut_eq (.pre_n(pre_n), .bl_env(bl_env), .blb_env(blb_env),
                 .bl_drv(eq_bl), .blb_drv(eq_blb));

  task automatic expect_eq(input sig_t got, input sig_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s pre_n=%0b got=%p exp=%p", what, pre_n, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // floating bitlines
    bl_env = Z; blb_env = Z;
    pre_n = 1'b0; #1;
    expect_eq(bl_drv, S1, "precharge bl");
    expect_eq(blb_drv, S1, "precharge blb");
    pre_n = 1'b1; #1;
    expect_eq(bl_drv, Z, "idle bl");
    expect_eq(blb_drv, Z, "idle blb");
    // bitlines left at 0 / 1 by a read: precharge still drives 1 on both
    bl_env = '{s: S_SMALL, x: 1'b0, v: 1'b0};
    blb_env = '{s: S_SMALL, x: 1'b0, v: 1'b1};
    pre_n = 1'b0; #1;
    expect_eq(bl_drv, S1, "recharge bl");
    expect_eq(blb_drv, S1, "recharge blb");
    // equaliser alone, both directions
    expect_eq(eq_blb, '{s: S_SMALL, x: 1'b0, v: 1'b0}, "eq bl->blb");
    expect_eq(eq_bl,  '{s: S_SMALL, x: 1'b0, v: 1'b1}, "eq blb->bl");
    bl_env = '{s: S_STRONG, x: 1'b0, v: 1'b0};
    blb_env = Z; #1;
    expect_eq(eq_blb, '{s: S_PULL, x: 1'b0, v: 1'b0}, "eq strong bl->blb");
    expect_eq(eq_bl,  Z, "eq nothing back");
    pre_n = 1'b1; #1;
    expect_eq(eq_blb, Z, "eq open");
    for (int i = 0; i < 100; i++) begin
      pre_n   = 1'($urandom_range(0, 1));
      bl_env  = '{s: strength_e'($urandom_range(0, 5)), x: 1'b0, v: 1'($urandom_range(0, 1))};
      blb_env = '{s: strength_e'($urandom_range(0, 5)), x: 1'b0, v: 1'($urandom_range(0, 1))};
      if (bl_env.s == S_HIGHZ) bl_env.v = 1'b0;
      if (blb_env.s == S_HIGHZ) blb_env.v = 1'b0;
      #1;
      // pull-ups are strong and beat anything up to pull passed through the equaliser
      expect_eq(bl_drv,  pre_n ? Z : S1, "rand bl");
      expect_eq(blb_drv, pre_n ? Z : S1, "rand blb");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
