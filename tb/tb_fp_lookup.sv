// Self-checking test of fp_lookup: for random normal inputs the seed for
// 1/x must satisfy |y*x - 1| < 2^-8 and the seed for 1/sqrt(x) must satisfy
// |y*y*x - 1| < 2^-7 (expected values from real arithmetic); pass-through and
// special values are checked exactly.
module tb_fp_lookup;
  import warp_pkg::*;
  import tb_fp_pkg::*;

  lut_e  mode;
  word_t x, y;
  int checks = 0, failures = 0;

  fp_lookup dut (.mode, .x, .y);

  task automatic expect_eq(word_t want);
    #1;
    checks++;
    if (y !== want) begin
      failures++;
      $display("mode %s x=%h: got %h, expected %h", mode.name(), x, y, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xr, yr, err;
    for (int i = 0; i < 2000; i++) begin
      x = {1'($urandom), 8'($urandom_range(2, 250)), 23'($urandom)};
      mode = LUT_NONE;  expect_eq(x);
      mode = LUT_RECIP;
      #1;
      xr = f2r(x); yr = f2r(y);
      err = yr * xr - 1.0;
      checks++;
      if (err > 0.00390625 || err < -0.00390625) begin
        failures++;
        $display("recip x=%h y=%h err=%f", x, y, err);
      end
      x[31] = 1'b0;
      mode = LUT_RSQRT;
      #1;
      xr = f2r(x); yr = f2r(y);
      err = yr * yr * xr - 1.0;
      checks++;
      if (err > 0.0078125 || err < -0.0078125) begin
        failures++;
        $display("rsqrt x=%h y=%h err=%f", x, y, err);
      end
    end
    mode = LUT_RECIP; x = 32'h0000_0000; expect_eq(32'h7F80_0000);
    mode = LUT_RECIP; x = 32'hFF80_0000; expect_eq(32'h8000_0000);
    mode = LUT_RSQRT; x = 32'hC080_0000; expect_eq(32'h7FC0_0000);
    mode = LUT_RSQRT; x = 32'h7F80_0000; expect_eq(32'h0000_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
