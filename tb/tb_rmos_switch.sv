// tb_rmos_switch: self-checking test of the resistive MOS switch, both types.
// Every strength, value and gate level is applied to an RpMOS and an RnMOS;
// the expected drain is taken from the resistive-device strength table
// written out here as a literal list, independent of the package function.
module tb_rmos_switch;
  import sram_pkg::*;

  int checks = 0, failures = 0;
  logic gate;
  sig_t src, drn_p, drn_n;

  // resistive reduction of strength 0..7 (highz..supply)
  localparam int RED [8] = '{0, 1, 1, 2, 2, 3, 5, 5};

  rmos_switch #(.P_TYPE(1'b1)) dut_p (.gate(gate), .src(src), .drn(drn_p));
  rmos_switch #(.P_TYPE(1'b0)) dut_n (.gate(gate), .src(src), .drn(drn_n));

  task automatic check(input sig_t got, input logic on, input string what);
    sig_t exp;
    exp = on ? '{s: strength_e'(RED[int'(src.s)]), x: src.x, v: src.v} : SIG_Z;
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s gate=%0b src=%p got=%p exp=%p", what, gate, src, got, exp);
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
    for (int s = 0; s < 8; s++)
      for (int v = 0; v < 2; v++)
        for (int x = 0; x < 2; x++)
          for (int g = 0; g < 2; g++) begin
            src  = '{s: strength_e'(s), x: x[0], v: v[0]};
            gate = g[0];
            #1;
            check(drn_p, !gate, "rpmos");
            check(drn_n, gate, "rnmos");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
