// Self-checking test of fp_alu: sums and differences of exactly
// representable operands and of random full-precision operands (rounded by
// the testbench from the exact double result), round-to-nearest-even ties,
// cancellation, special values, the pass operations, and a latency of
// exactly LAT cycles with a new operation every cycle.
module tb_fp_alu;
  import warp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  word_t a, b, r;
  alu_op_e op;
  int checks = 0, failures = 0;
  localparam int LAT = 5;
  localparam int NT = 900;

  fp_alu #(.LAT(LAT)) dut (.clk, .rst_n, .op, .a, .b, .r);

  always #5 clk = ~clk;

  word_t ta [NT], tbv [NT], te [NT];
  alu_op_e to [NT];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;
    to[n] = ALU_ADD; ta[n] = 32'h3F80_0000; tbv[n] = i2f(1, 24); te[n] = 32'h3F80_0000; n++; // tie, even
    to[n] = ALU_ADD; ta[n] = 32'h3F80_0001; tbv[n] = i2f(1, 24); te[n] = 32'h3F80_0002; n++; // tie, up
    to[n] = ALU_SUB; ta[n] = 32'h3F80_0000; tbv[n] = 32'h3F7F_FFFF; te[n] = i2f(1, 24); n++; // cancel
    to[n] = ALU_SUB; ta[n] = i2f(7, 3); tbv[n] = i2f(7, 3); te[n] = 32'h0000_0000; n++;       // x - x
    to[n] = ALU_SUB; ta[n] = 32'h7F80_0000; tbv[n] = 32'h7F80_0000; te[n] = 32'h7FC0_0000; n++; // inf-inf
    to[n] = ALU_ADD; ta[n] = 32'h7F7F_FFFF; tbv[n] = 32'h7F7F_FFFF; te[n] = 32'h7F80_0000; n++; // overflow
    to[n] = ALU_ADD; ta[n] = i2f(1, 0); tbv[n] = i2f(1, 40); te[n] = i2f(1, 0); n++;          // far apart
    to[n] = ALU_ADD; ta[n] = 32'h0000_0000; tbv[n] = i2f(-5); te[n] = i2f(-5); n++;
    to[n] = ALU_PASSA; ta[n] = 32'h1234_5678; tbv[n] = 32'h9ABC_DEF0; te[n] = 32'h1234_5678; n++;
    to[n] = ALU_PASSB; ta[n] = 32'h1234_5678; tbv[n] = 32'h9ABC_DEF0; te[n] = 32'h9ABC_DEF0; n++;
    // full-precision operands less than 2^20 apart: the double result is exact
    while (n < 400) begin
      ta[n] = rnd_float(110, 130); tbv[n] = rnd_float(110, 130);
      to[n] = (n % 2) ? ALU_SUB : ALU_ADD;
      te[n] = r2f((to[n] == ALU_ADD) ? f2r(ta[n]) + f2r(tbv[n]) : f2r(ta[n]) - f2r(tbv[n]));
      n++;
    end
    while (n < NT) begin
      automatic int x = rnd_range(-1023, 1023);
      automatic int y = rnd_range(-1023, 1023);
      automatic int s1 = rnd_range(-6, 6);
      automatic int s2 = rnd_range(-6, 6);
      automatic int sm = (s1 > s2) ? s1 : s2;
      automatic longint sx = longint'(x) <<< (sm - s1);
      automatic longint sy = longint'(y) <<< (sm - s2);
      to[n] = (n % 2) ? ALU_SUB : ALU_ADD;
      ta[n] = i2f(x, s1); tbv[n] = i2f(y, s2);
      if (x == 0 || y == 0) begin
        // zero operands are covered by the directed cases
        x = 3; ta[n] = i2f(x, s1);
        sx = longint'(x) <<< (sm - s1);
      end
      if (y == 0) begin
        y = -1; tbv[n] = i2f(y, s2);
        sy = longint'(y) <<< (sm - s2);
      end
      te[n] = (to[n] == ALU_ADD) ? i2f(sx + sy, sm) : i2f(sx - sy, sm);
      n++;
    end
    a = '0; b = '0; op = ALU_ADD;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NT + LAT; c++) begin
      @(negedge clk);
      if (c >= LAT) begin
        checks++;
        if (r !== te[c-LAT]) begin
          failures++;
          if (failures < 10)
            $display("mismatch op %0d (%s): %h, %h -> %h, expected %h", c-LAT, to[c-LAT].name(),
                     ta[c-LAT], tbv[c-LAT], r, te[c-LAT]);
        end
      end else if (c >= 1) begin
        checks++;
        if (r !== 32'd0) failures++;
      end
      if (c < NT) begin a = ta[c]; b = tbv[c]; op = to[c]; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
