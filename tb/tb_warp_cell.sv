// Self-checking test of one warp_cell driven directly by microinstructions:
//  1. x-file as a programmable delay (x_out = x_left delayed D + 2)
//  2. multiply-accumulate y_out = w * x + y with a weight held in the MPY
//     register file, checking the cycle offsets implied by the 5-cycle MPY
//     and ALU pipelines
//  3. x wraparound (x output fed back to the x-file)
//  4. y taken from the right neighbour (right-to-left flow)
//  5. data memory written and read with address pairs from the addr-file,
//     and the outgoing address stream
//  6. indirect addressing (memory read data used as the next address)
//  7. the look-up unit (approximate 1/x and 1/sqrt(x) times x through MPY)
// Expected values come from recorded inputs and integer arithmetic.
module tb_warp_cell;
  import warp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  uinst_t cntl_in, cntl_out;
  word_t x_left, y_left, y_right, addr_left, x_out, y_out, addr_out;
  int checks = 0, failures = 0;
  int cyc = 0;
  word_t hx [int], hy [int], hr [int], ha [int], hxo [int], hyo [int];

  warp_cell dut (.clk, .rst_n, .cntl_in, .x_left, .y_left, .y_right, .addr_left,
                 .cntl_out, .x_out, .y_out, .addr_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, word_t got, word_t want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("%s cycle %0d: got %h want %h", what, cyc, got, want);
    end
  endtask

  // Apply one microinstruction with the given inputs for one cycle; the
  // outputs of the previous edge are recorded first.
  task automatic step(uinst_t u, word_t xv, word_t yv, word_t yr, word_t av);
    @(negedge clk);
    cyc++;
    hxo[cyc] = x_out; hyo[cyc] = y_out;
    cntl_in = u; x_left = xv; y_left = yv; y_right = yr; addr_left = av;
    hx[cyc] = xv; hy[cyc] = yv; hr[cyc] = yr; ha[cyc] = av;
  endtask

  function automatic uinst_t nop();
    uinst_t u = '0;
    u.xf.op = CTR_HOLD; u.yf.op = CTR_HOLD; u.af.op = CTR_HOLD;
    return u;
  endfunction

  function automatic file_ctl_t fload(int d);
    file_ctl_t f = '0;
    f.op = CTR_LOAD; f.wload = FILE_AW'(d); f.rload = '0;
    return f;
  endfunction

  function automatic file_ctl_t frun();
    file_ctl_t f = '0;
    f.we = 1'b1; f.op = CTR_INC;
    return f;
  endfunction

  initial begin
    uinst_t u;
    int t0;
    cntl_in = '0; x_left = '0; y_left = '0; y_right = '0; addr_left = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- 1. programmable delay on x (D = 3 -> 5 cycles) ----
    u = nop(); u.xf = fload(3); step(u, 0, 0, 0, 0);
    t0 = cyc;
    for (int i = 0; i < 60; i++) begin
      u = nop(); u.xf = frun(); u.xbar[DST_XOUT] = SRC_XFILE;
      step(u, $urandom, 0, 0, 0);
      if (cyc - t0 > 6) check("xdelay", hxo[cyc], hx[cyc - 5]);
    end

    // ---- 2. multiply-accumulate: y_out = w*x(c-17) + y(c-8) ----
    u = nop(); u.mrf.we = 2'b10; u.mrf.wa1 = 5'd0; u.xbar[DST_MPYB] = SRC_LIT;
    u.literal = i2f(-3); u.xf = fload(5); u.yf = fload(1);
    step(u, 0, 0, 0, 0);
    t0 = cyc;
    for (int i = 0; i < 80; i++) begin
      u = nop(); u.xf = frun(); u.yf = frun();
      u.xbar[DST_MPYA] = SRC_XFILE; u.mrf.byp = 2'b01; u.mrf.ra1 = 5'd0;
      u.xbar[DST_ALUA] = SRC_MPY; u.xbar[DST_ALUB] = SRC_YFILE; u.arf.byp = 2'b11;
      u.alu_op = ALU_ADD; u.xbar[DST_YOUT] = SRC_ALU;
      step(u, i2f(rnd_range(-50, 50)), i2f(rnd_range(-500, 500)), 0, 0);
      if (cyc - t0 > 18) begin
        automatic int xi = int'(f2r(hx[cyc - 17]));
        automatic int yi = int'(f2r(hy[cyc - 8]));
        check("mac", hyo[cyc], i2f(-3 * xi + yi));
      end
    end

    // ---- 3. x wraparound: inject 3 words, then circulate (period 3) ----
    u = nop(); u.xf = fload(1); step(u, 0, 0, 0, 0);
    for (int i = 0; i < 3; i++) begin
      u = nop(); u.xf = frun(); u.xbar[DST_XOUT] = SRC_XFILE; u.xin = XIN_LEFT;
      step(u, 32'hC0DE_0000 + i, 0, 0, 0);
    end
    t0 = cyc;
    for (int i = 0; i < 30; i++) begin
      u = nop(); u.xf = frun(); u.xbar[DST_XOUT] = SRC_XFILE; u.xin = XIN_WRAP;
      step(u, $urandom, 0, 0, 0);
      if (cyc - t0 > 4) check("xwrap", hxo[cyc], hxo[cyc - 3]);
      if (cyc - t0 == 4) check("xwrap-first", hxo[cyc], 32'hC0DE_0000);
    end

    // ---- 4. y from the right neighbour through the y-file (3 cycles) ----
    u = nop(); u.yf = fload(1); step(u, 0, 0, 0, 0);
    t0 = cyc;
    for (int i = 0; i < 40; i++) begin
      u = nop(); u.yf = frun(); u.yin = YIN_RIGHT; u.xbar[DST_YOUT] = SRC_YFILE;
      step(u, 0, $urandom, $urandom, 0);
      if (cyc - t0 > 4) check("yright", hyo[cyc], hr[cyc - 3]);
    end

    // ---- 5. memory via addr-file: write mem[k] = x, then read back ----
    u = nop(); u.af = fload(1); u.xf = fload(1); step(u, 0, 0, 0, 0);
    t0 = cyc;
    for (int k = 0; k < 64 + 2; k++) begin
      addr_pair_t p;
      p.wr = 16'(k); p.rd = 16'(0);
      u = nop(); u.af = frun(); u.xf = frun(); u.mem_asel = MA_AFILE; u.mem_we = (k >= 2);
      u.xbar[DST_MEMD] = SRC_XFILE;
      step(u, 32'h5000_0000 + k, 0, 0, word_t'(p));
      // outgoing addresses: addr_out = addr_left delayed 3
      if (cyc - t0 > 4) check("addr_out", addr_out, ha[cyc - 3]);
    end
    t0 = cyc;
    for (int k = 0; k < 64 + 6; k++) begin
      addr_pair_t p;
      p.wr = 16'hFFFF; p.rd = 16'(63 - (k % 64));
      u = nop(); u.af = frun(); u.xf = frun(); u.mem_asel = MA_AFILE; u.mem_we = 1'b0;
      u.xbar[DST_YOUT] = SRC_MEM;
      step(u, 0, 0, 0, word_t'(p));
      if (cyc - t0 > 5) begin
        automatic addr_pair_t q = addr_pair_t'(ha[cyc - 4]);
        check("mem", hyo[cyc], 32'h5000_0000 + 32'(q.rd));
      end
    end

    // ---- 6. indirect addressing: mem[100+k] = {rd: k}; read mem[mem[100+k]] ----
    for (int k = 0; k < 16; k++) begin
      addr_pair_t p;
      p.wr = 16'(100 + k); p.rd = '0;
      u = nop(); u.mem_we = 1'b1; u.mem_asel = MA_XBAR; u.xbar[DST_MEMA] = SRC_LIT;
      u.xbar[DST_MEMD] = SRC_LIT;
      // literal serves as both the address pair and the data: wr = 100+k, rd = 40+k
      p.rd = 16'(40 + k);
      u.literal = word_t'(p);
      step(u, 0, 0, 0, 0);
    end
    for (int k = 0; k < 16; k++) begin
      addr_pair_t p;
      p.wr = 16'hFFFF; p.rd = 16'(100 + k);
      u = nop(); u.mem_asel = MA_XBAR; u.xbar[DST_MEMA] = SRC_LIT; u.literal = word_t'(p);
      step(u, 0, 0, 0, 0);               // read mem[100+k] -> {wr:100+k, rd:40+k}
      u = nop(); u.mem_asel = MA_MEM;    // use it as the address: read mem[40+k]
      step(u, 0, 0, 0, 0);
      u = nop(); u.xbar[DST_YOUT] = SRC_MEM;
      step(u, 0, 0, 0, 0);
      step(nop(), 0, 0, 0, 0);
      // mem[40+k] was written in test 5 and holds 0x5000_0000 + 40 + k
      check("indirect", hyo[cyc], 32'h5000_0000 + 40 + k);
    end

    // ---- 7. look-up unit: recip(v)*v and rsqrt(v)*v through MPY ----
    for (int k = 0; k < 40; k++) begin
      automatic word_t v = i2f(rnd_range(1, 100000), rnd_range(-10, 10));
      real r;
      u = nop(); u.xbar[DST_MPYA] = SRC_LIT; u.xbar[DST_MPYB] = SRC_LIT; u.mrf.byp = 2'b11;
      u.mlut = (k % 2) ? LUT_RSQRT : LUT_RECIP; u.literal = v;
      u.xbar[DST_YOUT] = SRC_MPY;
      step(u, 0, 0, 0, 0);
      for (int w = 0; w < 5; w++) begin
        u = nop(); u.xbar[DST_YOUT] = SRC_MPY; step(u, 0, 0, 0, 0);
      end
      step(nop(), 0, 0, 0, 0);
      r = f2r(hyo[cyc]);
      if (k % 2) r = r * r / f2r(v);
      checks++;
      if (r > 1.0 + 1.0/128 || r < 1.0 - 1.0/128) begin
        failures++;
        $display("lookup k=%0d v=%h got %h", k, v, hyo[cyc]);
      end
    end

    // the control word is passed on registered
    u = nop(); u.literal = 32'hFEED_BEEF; step(u, 0, 0, 0, 0);
    step(nop(), 0, 0, 0, 0);
    check("cntl_out", cntl_out.literal, 32'hFEED_BEEF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
