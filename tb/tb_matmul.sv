// Matrix-multiplication workload on the full 10-cell warp_array: five
// independent products Y_q = X_q W (q = 0..4) are interleaved so that the
// 5-stage ALU takes a new accumulation every cycle. Cell j holds column j of
// the n x 10 matrix W in MPY registers 0..n-1 (n = 10). The rows of the five
// X_q stream in on x, word x_q[i][k] in cycle 5k + q of a period of
// P = 5n = 50 cycles. Every cell runs the same periodic program:
//  * MPY: x-file word times MPY register k (k = phase / 5);
//  * ALU, 5 cycles later: product plus the ALU result fed back from 5 cycles
//    before, or, for k = 0, the product alone; in those five cycles the ALU
//    result, the finished y_q[i][j], is put on the y stream;
//  * otherwise y passes through the y-file (6 cycles per cell).
// Because all cells share one instruction stream that reaches cell j j cycles
// late, x must take P + 1 = 51 cycles per cell (Dx = 49) so that every cell
// sees the same phase of the program; cell j then works on row i in period
// i + j. The five-word bursts of the ten cells fill the y stream exactly and
// never collide. The weights are loaded through the x stream with one
// instruction per register, each cell catching its own word. Operands are
// small integers, so all sums are exact; every result is checked in the
// cycle it must leave the array.
module tb_matmul;
  import warp_pkg::*;
  import tb_fp_pkg::*;

  localparam int N  = 10;             // cells = columns of W (array default)
  localparam int NK = 10;             // inner dimension n
  localparam int NQ = 5;              // interleaved products
  localparam int R  = 4;              // rows of each X_q
  localparam int P  = NQ * NK;        // program period
  localparam int DX = P - 1;          // x-file delay: x takes P + 1 cycles per cell
  localparam int PL = 2;              // set-up cycle
  localparam int TW = PL + 1 + (DX + 1) * N + 10;   // first weight-load instruction
  localparam int T  = TW;             // first x word of the matrices
  localparam int C0 = T + DX + 1;     // cell 1's first MPY cycle
  localparam int NC = C0 + (R + N + 1) * P + 6 * N + 20;

  logic clk = 0, rst_n = 0;
  uinst_t cntl_in, cntl_out;
  word_t x_in, y_in, addr_in, y_right_in, x_out, y_out, addr_out, y_first_out;

  warp_array dut (.clk, .rst_n, .cntl_in, .x_in, .y_in, .addr_in, .y_right_in,
                  .cntl_out, .x_out, .y_out, .addr_out, .y_first_out);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  uinst_t prog [NC];
  word_t  hx [NC], ey [NC];
  bit     vy [NC];

  initial begin
    repeat (NC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic uinst_t base();
    uinst_t u = '0;
    u.xf.we = 1'b1; u.xf.op = CTR_INC; u.yf.we = 1'b1; u.yf.op = CTR_INC;
    u.af.op = CTR_HOLD;
    u.xbar[DST_XOUT] = SRC_XFILE; u.xbar[DST_YOUT] = SRC_YFILE;
    return u;
  endfunction

  initial begin
    int w [NK][N], x [NQ][R][NK];
    for (int t = 0; t < NC; t++) begin
      prog[t] = base(); hx[t] = $urandom; vy[t] = 0;
    end
    prog[PL].xf.op = CTR_LOAD; prog[PL].xf.wload = FILE_AW'(DX); prog[PL].xf.rload = '0;
    prog[PL].yf.op = CTR_LOAD; prog[PL].yf.wload = FILE_AW'(4);  prog[PL].yf.rload = '0;
    for (int k = 0; k < NK; k++) for (int j = 0; j < N; j++) w[k][j] = $urandom_range(0, 40) - 20;
    for (int q = 0; q < NQ; q++) for (int i = 0; i < R; i++) for (int k = 0; k < NK; k++)
      x[q][i][k] = $urandom_range(0, 40) - 20;

    // Weight load: the instruction in cycle TW + k runs in cell j in cycle
    // TW + k + j and stores the x word that entered the array in cycle
    // TW + k - (DX + 1) - (DX + 1) j.
    for (int k = 0; k < NK; k++) begin
      prog[TW + k].xbar[DST_MPYB] = SRC_XFILE; prog[TW + k].mrf.we = 2'b10;
      prog[TW + k].mrf.wa1 = 5'(k);
      for (int j = 0; j < N; j++) hx[TW + k - (DX + 1) * (j + 1)] = i2f(w[k][j]);
    end

    // Matrices on x.
    for (int i = 0; i < R; i++) for (int k = 0; k < NK; k++) for (int q = 0; q < NQ; q++)
      hx[T + i * P + 5 * k + q] = i2f(x[q][i][k]);

    // Periodic program.
    for (int c = C0; c < C0 + (R + N + 1) * P; c++) begin
      automatic int ph = (c - C0) % P;
      prog[c].xbar[DST_MPYA] = SRC_XFILE; prog[c].mrf.byp = 2'b01;
      prog[c].mrf.ra1 = 5'(ph / 5);
      if (c >= C0 + 5) begin
        automatic int pa = (c - 5 - C0) % P;       // phase of the product arriving now
        prog[c].xbar[DST_ALUA] = SRC_MPY;
        if (pa / 5 == 0) begin
          prog[c].arf.byp = 2'b01; prog[c].alu_op = ALU_PASSA;
          prog[c].xbar[DST_YOUT] = SRC_ALU;          // the finished sum of the previous row
        end else begin
          prog[c].xbar[DST_ALUB] = SRC_ALU; prog[c].arf.byp = 2'b11; prog[c].alu_op = ALU_ADD;
        end
      end
    end

    // Expected outputs: y_q[i][j] leaves cell j in the k = 0 ALU cycle of
    // period i + j + 1, then 6 cycles per cell to the right end.
    for (int i = 0; i < R; i++) for (int j = 0; j < N; j++) for (int q = 0; q < NQ; q++) begin
      automatic int p = C0 + (i + j + 1) * P + q + 5;
      automatic int t = p + j + 1 + 6 * (N - 1 - j);
      automatic int acc = 0;
      for (int k = 0; k < NK; k++) acc += x[q][i][k] * w[k][j];
      if (vy[t]) $fatal(1, "two results scheduled for cycle %0d", t);
      ey[t] = i2f(acc); vy[t] = 1;
    end

    cntl_in = '0; x_in = '0; y_in = '0; addr_in = '0; y_right_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NC; t++) begin
      @(negedge clk);
      if (vy[t]) begin
        checks++;
        if (y_out !== ey[t]) begin
          failures++;
          if (failures < 20) $display("y_out cycle %0d: got %h want %h", t, y_out, ey[t]);
        end
      end
      cntl_in = prog[t]; x_in = hx[t];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
