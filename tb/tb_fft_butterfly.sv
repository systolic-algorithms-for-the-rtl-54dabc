// FFT butterfly workload on one warp_cell. Sixteen radix-2 butterflies
//   (a_r + j a_i) +- (b_r + j b_i)(w_r + j w_i)
// are run at the rate of one every 6 cycles, the ALU's limit for six real
// adds. Each butterfly takes 23 cycles from first read to last result, so
// four are in flight at once. The ALU register file is used in four banks
// (register 8*(b mod 4) + i) so that overlapping butterflies do not collide,
// and each cycle's literal address pair carries one butterfly's read address
// and another's write address. Each butterfly uses four real multiplies and
// six real adds, built only from the cell's own resources:
//  * a and b are first written into the data memory, with addresses from the
//    addr-file and data from the microcode literal;
//  * each butterfly reads b_r, b_i, a_r, a_i from memory with literal
//    addresses;
//  * the MPY register file holds b and the twiddle, and the ALU register file
//    holds a and the partial results; the products leave the MPY after
//    5 cycles and the sums the ALU after 5 more;
//  * the four results go out on y and are written back to memory.
// Twiddles arrive on the x stream, a real and an imaginary word per
// butterfly. The cell's twiddle counter is set for a hold length of 4
// (INIT with log2 = 2 at cell position 0), as for a stage that reuses each
// twiddle for four butterflies: only the twiddles of butterflies 0, 4, 8 and
// 12 may be kept. Expected results are computed here with each operation
// rounded to single precision, in the order the cell performs them, and
// every result is checked in the exact cycle the schedule gives it.
module tb_fft_butterfly;
  import warp_pkg::*;
  import tb_fp_pkg::*;

  localparam int NB  = 16;            // butterflies
  localparam int HB  = 4;             // twiddle hold length
  localparam int S0  = 80;            // first butterfly cycle
  localparam int PER = 6;             // cycles per butterfly
  localparam int NC  = S0 + NB * PER + 60;
  // ALU result cycles of a_r + t_r, a_r - t_r, a_i + t_i, a_i - t_i
  localparam int OUTC [4] = '{17, 21, 19, 22};

  logic clk = 0, rst_n = 0;
  uinst_t cntl_in, cntl_out;
  word_t x_left, y_left, y_right, addr_left, x_out, y_out, addr_out;
  int checks = 0, failures = 0;

  warp_cell dut (.clk, .rst_n, .cntl_in, .x_left, .y_left, .y_right, .addr_left,
                 .cntl_out, .x_out, .y_out, .addr_out);

  always #5 clk = ~clk;

  initial begin
    repeat (NC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  uinst_t prog [NC];
  word_t  hx [NC], ha [NC], ey [NC];
  bit     vy [NC];

  function automatic uinst_t nop();
    uinst_t u = '0;
    u.xf.we = 1'b1; u.xf.op = CTR_INC;   // x stream and addr stream keep running
    u.af.we = 1'b1; u.af.op = CTR_INC;
    u.yf.op = CTR_HOLD;
    return u;
  endfunction

  function automatic word_t wr_pair(int a);
    addr_pair_t p;
    p.wr = 16'(a); p.rd = '0;
    return word_t'(p);
  endfunction

  // Overlapping butterflies share a cycle's literal address pair: one sets
  // the read address, another the write address.
  function automatic void set_rd(int t, int a);
    addr_pair_t p = addr_pair_t'(prog[t].literal);
    p.rd = 16'(a);
    prog[t].literal = word_t'(p);
    prog[t].mem_asel = MA_XBAR; prog[t].xbar[DST_MEMA] = SRC_LIT;
  endfunction

  function automatic void set_wr(int t, int a);
    addr_pair_t p = addr_pair_t'(prog[t].literal);
    p.wr = 16'(a);
    prog[t].literal = word_t'(p);
    prog[t].mem_asel = MA_XBAR; prog[t].xbar[DST_MEMA] = SRC_LIT;
  endfunction

  initial begin
    word_t ar [NB], ai [NB], br [NB], bi [NB], wr [NB], wi [NB];
    int    s;
    for (int t = 0; t < NC; t++) begin
      prog[t] = nop(); hx[t] = $urandom; ha[t] = '0; vy[t] = 0;
    end

    // Set-up: x- and addr-file delays of 1 (a word is read 2 cycles after it
    // enters), twiddle counter hold length 2^2.
    prog[0].xf.op = CTR_LOAD; prog[0].xf.wload = FILE_AW'(1); prog[0].xf.rload = '0;
    prog[0].af.op = CTR_LOAD; prog[0].af.wload = FILE_AW'(1); prog[0].af.rload = '0;
    prog[0].cnt = CNT_INIT; prog[0].literal = 32'd2;

    // Operands and twiddles (a twiddle index per butterfly on the x stream).
    for (int b = 0; b < NB; b++) begin
      automatic int  k  = $urandom_range(0, 7);
      automatic real th = -2.0 * 3.141592653589793 * real'(k) / 16.0;
      ar[b] = rnd_float(120, 130); ai[b] = rnd_float(120, 130);
      br[b] = rnd_float(120, 130); bi[b] = rnd_float(120, 130);
      wr[b] = r2f($cos(th)); wi[b] = r2f($sin(th));
      if (k == 0) wi[b] = 32'd0;
    end

    // Memory load: word 4b+0..3 = a_r, a_i, b_r, b_i.
    for (int i = 0; i < 4 * NB; i++) begin
      automatic int t = 4 + i;
      automatic int b = i / 4;
      ha[t - 2] = wr_pair(i);
      prog[t].mem_we = 1'b1; prog[t].mem_asel = MA_AFILE;
      prog[t].xbar[DST_MEMD] = SRC_LIT;
      case (i % 4)
        0: prog[t].literal = ar[b];
        1: prog[t].literal = ai[b];
        2: prog[t].literal = br[b];
        default: prog[t].literal = bi[b];
      endcase
    end

    for (int b = 0; b < NB; b++) begin
      automatic int r = 8 * (b % 4);   // ALU register bank of this butterfly
      word_t twr, twi, prr, pii, pri, pir, tr, ti;
      s = S0 + b * PER;
      // memory reads: c0 b_r, c1 b_i, c2 a_r, c3 a_i (data one cycle later)
      for (int k = 0; k < 4; k++) set_rd(s + k, 4*b + ((k + 2) % 4));
      // c0: twiddle real part (x stream) -> MPY reg 1, if the counter takes it
      prog[s].cnt = CNT_STEP; prog[s].xbar[DST_MPYB] = SRC_XFILE;
      prog[s].mrf.we[1] = 1'b1; prog[s].mrf.wa1 = 5'd1;
      hx[s - 2] = wr[b];
      // c1: twiddle imaginary part -> MPY reg 2; MPY b_r * w_r; b_r -> MPY reg 3
      prog[s+1].cnt = CNT_GATE; prog[s+1].xbar[DST_MPYB] = SRC_XFILE;
      prog[s+1].mrf.we[1] = 1'b1; prog[s+1].mrf.wa1 = 5'd2;
      prog[s+1].xbar[DST_MPYA] = SRC_MEM; prog[s+1].mrf.we[0] = 1'b1; prog[s+1].mrf.wa0 = 5'd3;
      prog[s+1].mrf.byp[0] = 1'b1; prog[s+1].mrf.ra1 = 5'd1;
      hx[s - 1] = wi[b];
      // c2: MPY b_i * w_i; b_i -> MPY reg 4
      prog[s+2].xbar[DST_MPYA] = SRC_MEM; prog[s+2].mrf.we[0] = 1'b1; prog[s+2].mrf.wa0 = 5'd4;
      prog[s+2].mrf.byp[0] = 1'b1; prog[s+2].mrf.ra1 = 5'd2;
      // c3: MPY b_r * w_i; a_r -> ALU reg r+2
      prog[s+3].mrf.ra0 = 5'd3; prog[s+3].mrf.ra1 = 5'd2;
      prog[s+3].xbar[DST_ALUA] = SRC_MEM; prog[s+3].arf.we[0] = 1'b1; prog[s+3].arf.wa0 = 5'(r + 2);
      // c4: MPY b_i * w_r; a_i -> ALU reg r+3
      prog[s+4].mrf.ra0 = 5'd4; prog[s+4].mrf.ra1 = 5'd1;
      prog[s+4].xbar[DST_ALUA] = SRC_MEM; prog[s+4].arf.we[0] = 1'b1; prog[s+4].arf.wa0 = 5'(r + 3);
      // c6: b_r*w_r -> ALU reg r; c7: t_r = reg r - b_i*w_i
      prog[s+6].xbar[DST_ALUA] = SRC_MPY; prog[s+6].arf.we[0] = 1'b1; prog[s+6].arf.wa0 = 5'(r);
      prog[s+7].xbar[DST_ALUB] = SRC_MPY; prog[s+7].arf.byp[1] = 1'b1; prog[s+7].arf.ra0 = 5'(r);
      prog[s+7].alu_op = ALU_SUB;
      // c8: b_r*w_i -> ALU reg r+1; c9: t_i = reg r+1 + b_i*w_r
      prog[s+8].xbar[DST_ALUA] = SRC_MPY; prog[s+8].arf.we[0] = 1'b1; prog[s+8].arf.wa0 = 5'(r + 1);
      prog[s+9].xbar[DST_ALUB] = SRC_MPY; prog[s+9].arf.byp[1] = 1'b1; prog[s+9].arf.ra0 = 5'(r + 1);
      prog[s+9].alu_op = ALU_ADD;
      // c12: a_r + t_r, t_r -> reg r+4; c16: a_r - t_r
      prog[s+12].xbar[DST_ALUB] = SRC_ALU; prog[s+12].arf.byp[1] = 1'b1; prog[s+12].arf.ra0 = 5'(r + 2);
      prog[s+12].arf.we[1] = 1'b1; prog[s+12].arf.wa1 = 5'(r + 4); prog[s+12].alu_op = ALU_ADD;
      prog[s+16].arf.ra0 = 5'(r + 2); prog[s+16].arf.ra1 = 5'(r + 4); prog[s+16].alu_op = ALU_SUB;
      // c14: a_i + t_i, t_i -> reg r+5; c17: a_i - t_i
      prog[s+14].xbar[DST_ALUB] = SRC_ALU; prog[s+14].arf.byp[1] = 1'b1; prog[s+14].arf.ra0 = 5'(r + 3);
      prog[s+14].arf.we[1] = 1'b1; prog[s+14].arf.wa1 = 5'(r + 5); prog[s+14].alu_op = ALU_ADD;
      prog[s+17].arf.ra0 = 5'(r + 3); prog[s+17].arf.ra1 = 5'(r + 5); prog[s+17].alu_op = ALU_SUB;
      // results leave the ALU in c17 (a_r + t_r), c19 (a_i + t_i), c21 (a_r - t_r),
      // c22 (a_i - t_i): to y and to memory words 100 + 4b + 0..3
      for (int k = 0; k < 4; k++) begin
        automatic int c = OUTC[k];
        prog[s+c].xbar[DST_YOUT] = SRC_ALU; prog[s+c].xbar[DST_MEMD] = SRC_ALU;
        prog[s+c].mem_we = 1'b1;
        set_wr(s + c, 100 + 4*b + k);
        vy[s+c+1] = 1;
      end
      // Reference: the twiddle kept is the one of the first butterfly of the hold period.
      twr = wr[(b / HB) * HB]; twi = wi[(b / HB) * HB];
      prr = r2f(f2r(br[b]) * f2r(twr)); pii = r2f(f2r(bi[b]) * f2r(twi));
      pri = r2f(f2r(br[b]) * f2r(twi)); pir = r2f(f2r(bi[b]) * f2r(twr));
      tr = r2f(f2r(prr) - f2r(pii));    ti = r2f(f2r(pri) + f2r(pir));
      ey[s+OUTC[0]+1] = r2f(f2r(ar[b]) + f2r(tr)); ey[s+OUTC[1]+1] = r2f(f2r(ar[b]) - f2r(tr));
      ey[s+OUTC[2]+1] = r2f(f2r(ai[b]) + f2r(ti)); ey[s+OUTC[3]+1] = r2f(f2r(ai[b]) - f2r(ti));
    end
    // Read back the last butterfly's results from memory.
    s = S0 + NB * PER + 24;
    for (int k = 0; k < 4; k++) begin
      set_rd(s + 2*k, 100 + 4*(NB-1) + k);
      prog[s+2*k+1].xbar[DST_YOUT] = SRC_MEM;
      ey[s+2*k+2] = ey[S0 + (NB-1)*PER + OUTC[k] + 1]; vy[s+2*k+2] = 1;
    end

    // Play the schedule: at each falling edge check, then apply the cycle's inputs.
    cntl_in = '0; x_left = '0; y_left = '0; y_right = '0; addr_left = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NC; t++) begin
      @(negedge clk);
      if (vy[t]) begin
        checks++;
        if (y_out !== ey[t]) begin
          failures++;
          if (failures < 20) $display("butterfly output cycle %0d: got %h want %h", t, y_out, ey[t]);
        end
      end
      cntl_in = prog[t]; x_left = hx[t]; addr_left = ha[t];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
