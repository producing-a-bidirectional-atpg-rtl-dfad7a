// tb_sense_amp: self-checking test of the two-bufif1 sense amplifier.
// Random bitline values (driven, undriven, conflicting) are applied with the
// enable low and high; outputs must be highz when disabled, the bitline value
// at strong when enabled, and unknown for an undriven or unknown bitline.
module tb_sense_amp;
  import sram_pkg::*;

  int checks = 0, failures = 0;
  logic sae;
  sig_t bl, blb, out, outb;

  sense_amp dut (.sae(sae), .bl(bl), .blb(blb), .out(out), .outb(outb));

  function automatic sig_t model(input logic en, input sig_t d);
    sig_t r;
    if (!en) return '{s: S_HIGHZ, x: 1'b0, v: 1'b0};
    if (d.s == S_HIGHZ || d.x) return '{s: S_STRONG, x: 1'b1, v: 1'b0};
    r = '{s: S_STRONG, x: 1'b0, v: d.v};
    return r;
  endfunction

  task automatic expect_eq(input sig_t got, input sig_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s sae=%0b got=%p exp=%p", what, sae, got, exp);
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
    for (int i = 0; i < 300; i++) begin
      sae = 1'($urandom_range(0, 1));
      bl  = '{s: strength_e'($urandom_range(0, 7)), x: ($urandom_range(0, 7) == 0), v: 1'($urandom_range(0, 1))};
      blb = '{s: strength_e'($urandom_range(0, 7)), x: 1'b0, v: 1'($urandom_range(0, 1))};
      if (bl.x) bl.v = 1'b0;
      if (bl.s == S_HIGHZ) bl.v = 1'b0;
      if (blb.s == S_HIGHZ) blb.v = 1'b0;
      #1;
      expect_eq(out,  model(sae, bl),  "out");
      expect_eq(outb, model(sae, blb), "outb");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
