// Self-checking test of fp_mul: products of exactly representable operands,
// products of random full-precision operands rounded by the testbench,
// rounding (including a round-to-even tie), special values, and a result
// latency of exactly LAT cycles with a new operation issued every cycle.
module tb_fp_mul;
  import warp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  word_t a, b, p;
  int checks = 0, failures = 0;
  localparam int LAT = 5;
  localparam int NT = 800;

  fp_mul #(.LAT(LAT)) dut (.clk, .rst_n, .a, .b, .p);

  always #5 clk = ~clk;

  word_t ta [NT], tbv [NT], te [NT];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;
    // directed cases
    ta[n] = 32'h3F80_0001; tbv[n] = 32'h3F80_0001; te[n] = 32'h3F80_0002; n++; // (1+u)^2
    ta[n] = 32'h3F80_0001; tbv[n] = 32'h3FC0_0000; te[n] = 32'h3FC0_0002; n++; // tie -> even
    ta[n] = 32'h7F80_0000; tbv[n] = 32'hC000_0000; te[n] = 32'hFF80_0000; n++; // inf * -2
    ta[n] = 32'h7F80_0000; tbv[n] = 32'h0000_0000; te[n] = 32'h7FC0_0000; n++; // inf * 0
    ta[n] = 32'h7FC0_0001; tbv[n] = 32'h3F80_0000; te[n] = 32'h7FC0_0000; n++; // NaN
    ta[n] = i2f(1, -100);  tbv[n] = i2f(1, -100);  te[n] = 32'h7F80_0000; n++; // overflow
    ta[n] = i2f(-1, 100);  tbv[n] = i2f(1, 100);   te[n] = 32'h8000_0000; n++; // underflow
    ta[n] = 32'h0000_0000; tbv[n] = i2f(-3);       te[n] = 32'h8000_0000; n++; // +0 * -3
    // full-precision operands: the double product is exact, rounded here
    while (n < 400) begin
      ta[n] = rnd_float(70, 180); tbv[n] = rnd_float(70, 180);
      te[n] = r2f(f2r(ta[n]) * f2r(tbv[n]));
      n++;
    end
    while (n < NT) begin
      automatic int x = rnd_range(-2047, 2047);
      automatic int y = rnd_range(-2047, 2047);
      automatic int s1 = rnd_range(-20, 20);
      automatic int s2 = rnd_range(-20, 20);
      ta[n] = i2f(x, s1); tbv[n] = i2f(y, s2);
      te[n] = (x == 0 || y == 0) ? {ta[n][31] ^ tbv[n][31], 31'd0} : i2f(longint'(x) * y, s1 + s2);
      n++;
    end
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NT + LAT; c++) begin
      @(negedge clk);
      // check the result of the operation issued LAT cycles ago
      if (c >= LAT) begin
        checks++;
        if (p !== te[c-LAT]) begin
          failures++;
          if (failures < 10)
            $display("mismatch op %0d: %h * %h = %h, expected %h", c-LAT, ta[c-LAT], tbv[c-LAT], p, te[c-LAT]);
        end
      end else if (c >= 1) begin
        // nothing has emerged yet: the pipeline still holds its reset zero
        checks++;
        if (p !== 32'd0) failures++;
      end
      if (c < NT) begin a = ta[c]; b = tbv[c]; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
