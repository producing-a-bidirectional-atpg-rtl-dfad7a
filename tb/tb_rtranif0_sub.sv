// tb_rtranif0_sub: self-checking test of the rtranif0_sub pass-switch substitute (RpMOS, closed while ctrl = 0).
// Random environments on both terminals are applied with the control open
// and closed. Each direction must carry the other side's value one resistive
// strength step lower (table written out here), or nothing when open. A
// directed case checks that a strong driver on one side arrives at pull,
// strong enough to overpower a weak driver resolved on the far net.
module tb_rtranif0_sub;
  import sram_pkg::*;

  int checks = 0, failures = 0;
  logic ctrl;
  sig_t a_env, b_env, a_drv, b_drv;

  localparam int RED [8] = '{0, 1, 1, 2, 2, 3, 5, 5};

  rtranif0_sub dut (.ctrl(ctrl), .a_env(a_env), .b_env(b_env), .a_drv(a_drv), .b_drv(b_drv));

  function automatic sig_t through(input logic on, input sig_t d);
    if (!on) return SIG_Z;
    return '{s: strength_e'(RED[int'(d.s)]), x: d.x, v: d.v};
  endfunction

  task automatic expect_eq(input sig_t got, input sig_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s ctrl=%0b got=%p exp=%p", what, ctrl, got, exp);
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
    for (int i = 0; i < 200; i++) begin
      ctrl  = 1'($urandom_range(0, 1));
      a_env = '{s: strength_e'($urandom_range(0, 7)), x: 1'b0, v: 1'($urandom_range(0, 1))};
      b_env = '{s: strength_e'($urandom_range(0, 7)), x: 1'b0, v: 1'($urandom_range(0, 1))};
      #1;
      expect_eq(b_drv, through(!ctrl, a_env), "a->b");
      expect_eq(a_drv, through(!ctrl, b_env), "b->a");
    end
    // strong 1 on A, weak 0 already on B: B side receives pull 1, which wins
    ctrl  = 1'b0;
    a_env = '{s: S_STRONG, x: 1'b0, v: 1'b1};
    b_env = '{s: S_WEAK,   x: 1'b0, v: 1'b0};
    #1;
    expect_eq(b_drv, '{s: S_PULL, x: 1'b0, v: 1'b1}, "strong through");
    expect_eq(resolve(b_drv, b_env), '{s: S_PULL, x: 1'b0, v: 1'b1}, "overpower");
    expect_eq(a_drv, '{s: S_MEDIUM, x: 1'b0, v: 1'b0}, "weak back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
