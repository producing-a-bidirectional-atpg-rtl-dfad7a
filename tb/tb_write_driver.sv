// tb_write_driver: self-checking test of the bitline write driver.
// For each enable and data value the two bitline drives are compared with the
// expected complementary strong drive, or highz while disabled.
module tb_write_driver;
  import sram_pkg::*;

  int checks = 0, failures = 0;
  logic we, din;
  sig_t bl_drv, blb_drv;

  write_driver dut (.we(we), .din(din), .bl_drv(bl_drv), .blb_drv(blb_drv));

  task automatic expect_eq(input sig_t got, input sig_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s we=%0b din=%0b got=%p exp=%p", what, we, din, got, exp);
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
    for (int i = 0; i < 16; i++) begin
      {we, din} = 2'(i);
      #1;
      expect_eq(bl_drv,  we ? '{s: S_STRONG, x: 1'b0, v: din}  : '{s: S_HIGHZ, x: 1'b0, v: 1'b0}, "bl");
      expect_eq(blb_drv, we ? '{s: S_STRONG, x: 1'b0, v: !din} : '{s: S_HIGHZ, x: 1'b0, v: 1'b0}, "blb");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
