// Self-checking test of regfile against a reference array: random writes on
// both ports (port 1 winning on a common address), flow-through reads that
// return the old value in the cycle of a write, and the operand bypass.
module tb_regfile;
  import warp_pkg::*;

  logic clk = 0;
  rf_ctl_t ctl;
  word_t wd0, wd1, op0, op1;
  word_t model [RF_WORDS];
  int checks = 0, failures = 0;

  regfile dut (.clk, .ctl, .wd0, .wd1, .op0, .op1);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every register through port 0, then through port 1
    ctl = '0;
    for (int i = 0; i < RF_WORDS; i++) begin
      @(negedge clk);
      ctl = '0; ctl.we = 2'b01; ctl.wa0 = RF_AW'(i); wd0 = $urandom; model[i] = wd0;
    end
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      // check the reads of the configuration applied in the previous half cycle
      ctl.we  = 2'($urandom);
      ctl.wa0 = RF_AW'($urandom);
      ctl.wa1 = (c % 4 == 0) ? ctl.wa0 : RF_AW'($urandom);
      ctl.ra0 = (c % 3 == 0) ? ctl.wa0 : RF_AW'($urandom);
      ctl.ra1 = RF_AW'($urandom);
      ctl.byp = 2'($urandom);
      wd0 = $urandom; wd1 = $urandom;
      #1;
      checks += 2;
      if (op0 !== (ctl.byp[0] ? wd0 : model[ctl.ra0])) failures++;
      if (op1 !== (ctl.byp[1] ? wd1 : model[ctl.ra1])) failures++;
      @(posedge clk);
      if (ctl.we[0]) model[ctl.wa0] = wd0;
      if (ctl.we[1]) model[ctl.wa1] = wd1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
