// End-to-end test of the full-size warp_array (10 cells, default
// parameters). A cycle-by-cycle schedule of microinstructions and host words
// is built first, then played into cell 1 while the outputs are compared with
// values computed here from the schedule. Programs, in order:
//  A  1-D convolution, one weight per cell held in the MPY register file,
//     with weights loaded through the x stream; x runs 7 cycles per cell and
//     y 8 cycles per cell (one output per cycle); the address stream is
//     passed through the addr-files and checked at the right end.
//  A2 convolution with adaptive weights: each cell holds four weight sets in
//     its data memory and the set used for every output is chosen by an
//     address that travels with that output on the address stream.
//  B  right-to-left flow: y enters at the right end and leaves cell 1.
//  C  wraparound: every cell feeds its x output back to its own x-file.
//  D  data memory written from literals, indirect addressing, and the
//     look-up unit (1/x and 1/sqrt(x) seeds multiplied back by x).
//  E  FFT twiddle distribution for n = 16: the powers w^0..w^7 pass along
//     the x stream (x runs 49 cycles per cell, eight butterfly periods of
//     six cycles plus one), one complex twiddle (real, then imaginary word)
//     per butterfly, and each cell's twiddle counter keeps the ones its
//     stage needs in MPY registers 1 and 2. The registers are read inside
//     cells 1..5 and compared with the lists of the FFT mapping (cell 5,
//     past the last stage, keeps every entry).
// Each mechanism is counted; one that never happens counts as a failure.
module tb_warp_array;
  import warp_pkg::*;
  import tb_fp_pkg::*;

  localparam int N  = 10;      // must match the array's default size
  localparam int NC = 2600;    // schedule length in cycles
  localparam int M  = 200;     // outputs per convolution
  localparam int NS = 4;       // weight sets for A2

  logic clk = 0, rst_n = 0;
  uinst_t cntl_in, cntl_out;
  word_t x_in, y_in, addr_in, y_right_in, x_out, y_out, addr_out, y_first_out;

  warp_array dut (.clk, .rst_n, .cntl_in, .x_in, .y_in, .addr_in, .y_right_in,
                  .cntl_out, .x_out, .y_out, .addr_out, .y_first_out);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  uinst_t prog [NC];
  word_t  hx [NC], hy [NC], ha [NC], hr [NC];
  word_t  ey [NC], ex [NC], ea [NC], ef [NC];
  bit     vy [NC], vx [NC], va [NC], vf [NC], vapprox [NC];
  word_t  vsrc [NC];   // input of a look-up check
  bit     vrsq [NC];

  // mechanism counters
  int n_delay = 0, n_load = 0, n_mac = 0, n_adapt = 0, n_addr = 0,
      n_bidir = 0, n_wrap = 0, n_indirect = 0, n_lookup = 0, n_twiddle = 0;

  // FFT program E: expected twiddle register contents of cells 1..NTW.
  localparam int NTW = 5;
  int     etw [NTW][NC];   // expected twiddle exponent, -1 = no check
  word_t  tw_re [NTW], tw_im [NTW];
  for (genvar j = 0; j < NTW; j++) begin : g_tw
    assign tw_re[j] = dut.g_cell[j].u_cell.u_mrf.mem[1];
    assign tw_im[j] = dut.g_cell[j].u_cell.u_mrf.mem[2];
  end

  initial begin
    repeat (NC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic uinst_t nop();
    uinst_t u = '0;
    u.xf.op = CTR_HOLD; u.yf.op = CTR_HOLD; u.af.op = CTR_HOLD;
    return u;
  endfunction

  function automatic file_ctl_t fload(int d);
    file_ctl_t f = '0;
    f.op = CTR_LOAD; f.wload = FILE_AW'(d);
    return f;
  endfunction

  function automatic file_ctl_t frun();
    file_ctl_t f = '0;
    f.we = 1'b1; f.op = CTR_INC;
    return f;
  endfunction

  // steady instruction of the convolution programs
  function automatic uinst_t conv_inst(bit adaptive);
    uinst_t u = nop();
    u.xf = frun(); u.yf = frun(); u.af = frun();
    u.mem_asel = MA_AFILE;
    u.xbar[DST_XOUT] = SRC_XFILE;
    u.xbar[DST_MPYA] = SRC_XFILE;
    if (adaptive) begin
      u.xbar[DST_MPYB] = SRC_MEM; u.mrf.byp = 2'b11;     // weight from the data memory
    end else begin
      u.mrf.byp = 2'b01; u.mrf.ra1 = '0;                 // weight in register 0
    end
    u.xbar[DST_ALUA] = SRC_MPY; u.xbar[DST_ALUB] = SRC_YFILE; u.arf.byp = 2'b11;
    u.alu_op = ALU_ADD;
    u.xbar[DST_YOUT] = SRC_ALU;
    return u;
  endfunction

  function automatic int fi(word_t f);
    return int'(f2r(f));
  endfunction

  initial begin
    int w [N], wa [NS][N];
    int xv [M + N], bias [M], sel [M];
    int pa, pb, pc, pd, pw, pe, pf, t0, tw, c;
    // twiddle exponents per stage and butterfly for n = 16
    int fft16 [4][8] = '{'{0, 0, 0, 0, 0, 0, 0, 0},
                         '{0, 0, 0, 0, 4, 4, 4, 4},
                         '{0, 0, 2, 2, 4, 4, 6, 6},
                         '{0, 1, 2, 3, 4, 5, 6, 7}};
    addr_pair_t p;

    // defaults: idle instruction, random small host words
    for (int i = 0; i < NC; i++) begin
      prog[i] = nop();
      hx[i] = i2f(rnd_range(-9, 9)); hy[i] = '0; ha[i] = $urandom; hr[i] = $urandom;
      vy[i] = 0; vx[i] = 0; va[i] = 0; vf[i] = 0; vapprox[i] = 0;
    end

    // ---------------- A: 1-D convolution, weights in registers ----------------
    pa = 0; tw = 70; t0 = tw + 1;
    for (int j = 0; j < N; j++) w[j] = rnd_range(-4, 4);
    for (int i = 0; i < M + N; i++) xv[i] = rnd_range(-16, 16);
    for (int i = 0; i < M; i++) bias[i] = rnd_range(-100, 100);
    prog[pa] = nop(); prog[pa].xf = fload(5); prog[pa].yf = fload(1); prog[pa].af = fload(1);
    for (c = pa + 1; c < pa + 400; c++) prog[c] = conv_inst(0);
    prog[pa + tw].mrf.we = 2'b10; prog[pa + tw].mrf.wa1 = '0; prog[pa + tw].xbar[DST_MPYB] = SRC_XFILE;
    // cell j (0-based) latches the word entered 6 + 6j cycles before the load step
    for (int j = 0; j < N; j++) hx[pa + tw - 6 - 6*j] = i2f(w[j]);
    for (int i = 0; i < M + N - 1; i++) hx[pa + t0 + i] = i2f(xv[i]);
    for (int i = 0; i < M; i++) begin
      automatic int s = bias[i];
      hy[pa + t0 + i + 9] = i2f(bias[i]);
      for (int j = 0; j < N; j++) s += w[j] * xv[i + j];
      ey[pa + t0 + 9 + 8*N + i] = i2f(s); vy[pa + t0 + 9 + 8*N + i] = 1;
    end
    // address stream: 3 cycles per cell through the addr-files
    for (c = pa + 5*N; c < pa + 400; c++) begin
      ea[c] = ha[c - 3*N]; va[c] = 1;
    end

    // ---------------- A2: adaptive weights from the data memory ----------------
    pb = 410;
    for (int s = 0; s < NS; s++) for (int j = 0; j < N; j++) wa[s][j] = rnd_range(-4, 4);
    for (int i = 0; i < M + N; i++) xv[i] = rnd_range(-16, 16);
    for (int i = 0; i < M; i++) begin bias[i] = rnd_range(-100, 100); sel[i] = rnd_range(0, NS - 1); end
    prog[pb] = nop(); prog[pb].xf = fload(5); prog[pb].yf = fload(1); prog[pb].af = fload(6);
    for (c = pb + 1; c < pb + 400; c++) prog[c] = conv_inst(1);
    for (int s = 0; s < NS; s++) begin
      c = pb + tw + s;
      p.wr = 16'(16 + s); p.rd = '0;
      prog[c].mem_we = 1'b1; prog[c].mem_asel = MA_XBAR;
      prog[c].xbar[DST_MEMA] = SRC_LIT; prog[c].literal = word_t'(p);
      prog[c].xbar[DST_MEMD] = SRC_XFILE;
      for (int j = 0; j < N; j++) hx[c - 6 - 6*j] = i2f(wa[s][j]);
    end
    t0 = tw + NS + 2;
    for (int i = 0; i < M + N - 1; i++) hx[pb + t0 + i] = i2f(xv[i]);
    for (int i = 0; i < M; i++) begin
      automatic int s = bias[i];
      p.wr = 16'hFFFF; p.rd = 16'(16 + sel[i]);
      ha[pb + t0 + i - 2] = word_t'(p);   // address travels 2 cycles ahead of x
      hy[pb + t0 + i + 9] = i2f(bias[i]);
      for (int j = 0; j < N; j++) s += wa[sel[i]][j] * xv[i + j];
      ey[pb + t0 + 9 + 8*N + i] = i2f(s); vy[pb + t0 + 9 + 8*N + i] = 1;
    end

    // ---------------- B: y from right to left ----------------
    pc = 820;
    prog[pc] = nop(); prog[pc].xf = fload(1); prog[pc].yf = fload(1);
    for (c = pc + 1; c < pc + 200; c++) begin
      prog[c] = nop();
      prog[c].yf = frun(); prog[c].yin = YIN_RIGHT; prog[c].xbar[DST_YOUT] = SRC_YFILE;
      prog[c].xf = frun(); prog[c].xbar[DST_XOUT] = SRC_XFILE;
    end
    for (c = pc + 4*N + 2; c < pc + 200; c++) begin
      ef[c] = hr[c - 3*N]; vf[c] = 1;
    end

    // ---------------- C: wraparound (x keeps passing from B, then loops) ----------------
    pd = pc + 200;
    for (c = pd; c < pd + 150; c++) begin
      hx[c] = 32'hA000_0000 + 32'(c);
      prog[c] = nop(); prog[c].xf = frun(); prog[c].xbar[DST_XOUT] = SRC_XFILE;
      prog[c].xin = (c < pd + 40) ? XIN_LEFT : XIN_WRAP;
    end
    for (c = pd - 150; c < pd; c++) hx[c] = 32'hA000_0000 + 32'(c);
    pw = pd + 40;
    for (c = pw + N - 1; c < pd + 150; c++) begin
      ex[c] = hx[pw - 2*N - 1 + ((c - (pw + N - 1)) % 3)]; vx[c] = 1;
    end

    // ---------------- D: memory, indirect addressing, look-up ----------------
    pe = pd + 160;
    c = pe;
    for (int k = 0; k < 8; k++) begin
      p.wr = 16'(200 + k); p.rd = 16'(300 + k);
      prog[c] = nop(); prog[c].mem_we = 1; prog[c].mem_asel = MA_XBAR;
      prog[c].xbar[DST_MEMA] = SRC_LIT; prog[c].xbar[DST_MEMD] = SRC_LIT;
      prog[c].literal = word_t'(p); c++;
      p.wr = 16'(300 + k); p.rd = 16'h0ABC;
      prog[c] = prog[c-1]; prog[c].literal = word_t'(p); c++;
    end
    c += 2;
    for (int k = 0; k < 8; k++) begin
      p.wr = '0; p.rd = 16'(200 + k);
      prog[c] = nop(); prog[c].mem_asel = MA_XBAR; prog[c].xbar[DST_MEMA] = SRC_LIT;
      prog[c].literal = word_t'(p);
      prog[c+1] = nop(); prog[c+1].mem_asel = MA_MEM;
      prog[c+2] = nop(); prog[c+2].xbar[DST_YOUT] = SRC_MEM;
      p.wr = 16'(300 + k); p.rd = 16'h0ABC;
      ey[c + 2 + N] = word_t'(p); vy[c + 2 + N] = 1;
      c += 4;
    end
    for (int k = 0; k < 16; k++) begin
      word_t v;
      v = i2f(rnd_range(1, 50000), rnd_range(-12, 12));
      prog[c] = nop(); prog[c].xbar[DST_MPYA] = SRC_LIT; prog[c].xbar[DST_MPYB] = SRC_LIT;
      prog[c].mrf.byp = 2'b11; prog[c].literal = v;
      prog[c].mlut = (k % 2) ? LUT_RSQRT : LUT_RECIP;
      prog[c+5].xbar[DST_YOUT] = SRC_MPY;
      vapprox[c + 5 + N] = 1; vsrc[c + 5 + N] = v; vrsq[c + 5 + N] = (k % 2);
      c += 7;
    end

    // ---------------- E: FFT twiddle distribution, n = 16 ----------------
    pf = c + 20;
    prog[pf] = nop(); prog[pf].xf = fload(47);
    prog[pf].cnt = CNT_INIT; prog[pf].literal = 32'd3;   // log2(16/2)
    for (c = pf + 1; c < pf + 1 + 6*64; c++) begin
      prog[c] = nop(); prog[c].xf = frun(); prog[c].xbar[DST_XOUT] = SRC_XFILE;
      hx[c] = 32'hDEAD_0000 + 32'(c);
      if ((c - pf - 1) % 6 < 2) begin
        automatic int m = (c - pf - 1) / 6;
        automatic bit im = (c - pf - 1) % 6 == 1;
        hx[c] = (im ? 32'h7F00_0000 : 32'h7E00_0000) + 32'(m % 8);  // w^(m mod 8)
        prog[c].cnt = im ? CNT_GATE : CNT_STEP; prog[c].xbar[DST_MPYB] = SRC_XFILE;
        prog[c].mrf.we = 2'b10; prog[c].mrf.wa1 = im ? 5'd2 : 5'd1;
      end
    end
    for (int j = 0; j < NTW; j++) for (c = 0; c < NC; c++) etw[j][c] = -1;
    for (int j = 0; j < NTW; j++)
      for (int b = 8 + 8*j; b < 8 + 8*j + 16; b++)
        etw[j][pf + 6*b + j + 3] = (j < 4) ? fft16[j][b % 8] : b % 8;
    c = pf + 1 + 6*64;
    if (c + 20 > NC) $fatal(1, "schedule too long");

    // ---------------- play the schedule ----------------
    cntl_in = nop(); x_in = '0; y_in = '0; addr_in = '0; y_right_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NC; t++) begin
      @(negedge clk);
      if (vy[t]) begin
        checks++;
        if (y_out !== ey[t]) begin
          failures++;
          if (failures < 20) $display("y_out cycle %0d: got %h want %h", t, y_out, ey[t]);
        end else if (t < 410) n_mac++;
        else if (t < 820) n_adapt++;
      end
      if (va[t]) begin
        checks++;
        if (addr_out !== ea[t]) begin
          failures++;
          if (failures < 20) $display("addr_out cycle %0d: got %h want %h", t, addr_out, ea[t]);
        end else n_addr++;
      end
      if (vf[t]) begin
        checks++;
        if (y_first_out !== ef[t]) begin
          failures++;
          if (failures < 20) $display("y_first_out cycle %0d: got %h want %h", t, y_first_out, ef[t]);
        end
      end
      if (vx[t]) begin
        checks++;
        if (x_out !== ex[t]) begin
          failures++;
          if (failures < 20) $display("x_out cycle %0d: got %h want %h", t, x_out, ex[t]);
        end
      end
      if (vapprox[t]) begin
        real r;
        r = f2r(y_out);
        if (vrsq[t]) r = r * r / f2r(vsrc[t]);
        checks++;
        if (r > 1.0 + 1.0/128 || r < 1.0 - 1.0/128) begin
          failures++;
          $display("look-up cycle %0d: input %h result %h", t, vsrc[t], y_out);
        end
      end
      for (int j = 0; j < NTW; j++) if (etw[j][t] >= 0) begin
        checks += 2;
        if (tw_re[j] !== 32'h7E00_0000 + 32'(etw[j][t]) ||
            tw_im[j] !== 32'h7F00_0000 + 32'(etw[j][t])) begin
          failures++;
          if (failures < 20) $display("twiddle cell %0d cycle %0d: got %h %h want w^%0d", j + 1, t, tw_re[j], tw_im[j], etw[j][t]);
        end else n_twiddle++;
      end
      cntl_in = prog[t]; x_in = hx[t]; y_in = hy[t]; addr_in = ha[t]; y_right_in = hr[t];
    end
    repeat (N + 2) @(negedge clk);

    $display("mechanisms: delay=%0d load=%0d mac=%0d adaptive=%0d addr=%0d bidir=%0d wrap=%0d indirect=%0d lookup=%0d twiddle=%0d",
             n_delay, n_load, n_mac, n_adapt, n_addr, n_bidir, n_wrap, n_indirect, n_lookup, n_twiddle);
    if (n_delay == 0 || n_load == 0 || n_mac == 0 || n_adapt == 0 || n_addr == 0 ||
        n_bidir == 0 || n_wrap == 0 || n_indirect == 0 || n_lookup == 0 || n_twiddle == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count what the last cell actually executed.
  uinst_t ulast;
  assign ulast = dut.g_cell[N-1].u_cell.cntl_in;
  always @(posedge clk) if (rst_n) begin
    if (ulast.xf.op == CTR_INC && ulast.xf.we) n_delay++;
    if (ulast.xf.op == CTR_LOAD || ulast.af.op == CTR_LOAD) n_load++;
    if (ulast.yin == YIN_RIGHT) n_bidir++;
    if (ulast.xin == XIN_WRAP) n_wrap++;
    if (ulast.mem_asel == MA_MEM) n_indirect++;
    if (ulast.mlut != LUT_NONE) n_lookup++;
  end
endmodule
