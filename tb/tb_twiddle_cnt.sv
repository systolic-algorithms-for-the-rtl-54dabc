// Self-checking test of twiddle_cnt. Instances at cell positions 0..4 are
// given the same INIT/STEP sequences. For a 16-point FFT (log_hold1 = 3) the
// twiddle exponent each cell holds, rebuilt from its `take` pulses, must
// follow the lists of the FFT mapping: 0 0 0 0 0 0 0 0 / 0 0 0 0 4 4 4 4 /
// 0 0 2 2 4 4 6 6 / 0 1 2 3 4 5 6 7. Random sizes, random idle cycles
// between steps and re-INIT in mid-sequence check the general rule: take
// when the step count is a multiple of 2^max(log_hold1 - cell, 0). GATE
// cycles (the second word of a complex twiddle) must repeat the decision of
// the last STEP, and give no take between INIT and the first STEP.
module tb_twiddle_cnt;
  import warp_pkg::*;

  localparam int NCELL = 5;

  logic       clk = 1'b0, rst_n = 1'b0;
  cnt_e       op = CNT_IDLE;
  logic [4:0] lh = '0;
  logic       take [NCELL];
  int checks = 0, failures = 0;

  for (genvar j = 0; j < NCELL; j++) begin : g_dut
    twiddle_cnt #(.CELL_INDEX(j)) dut (.clk, .rst_n, .op, .log_hold1(lh), .take(take[j]));
  end

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Twiddle exponents of the n = 16 mapping, per stage (cell) and butterfly.
  int fft16 [4][8] = '{'{0, 0, 0, 0, 0, 0, 0, 0},
                       '{0, 0, 0, 0, 4, 4, 4, 4},
                       '{0, 0, 2, 2, 4, 4, 6, 6},
                       '{0, 1, 2, 3, 4, 5, 6, 7}};

  // Model state.
  int mcnt, mlg [NCELL], held [NCELL];
  bit mlast [NCELL];

  task automatic init(input int l);
    @(negedge clk);
    op = CNT_INIT; lh = 5'(l);
    for (int j = 0; j < NCELL; j++) begin
      checks++;
      if (take[j] !== 1'b0) failures++;
      mlg[j] = (l > j) ? l - j : 0;
      mlast[j] = 1'b0;
    end
    mcnt = 0;
    @(negedge clk);
    op = CNT_IDLE; lh = 5'($urandom);  // log_hold1 is only used by INIT
  endtask

  // One butterfly; in the STEP cycle the entry on the x stream has exponent
  // `entry`, which a cell keeps when its take is high.
  task automatic step(input int entry);
    int idle = $urandom_range(0, 3);
    repeat (idle) begin
      @(negedge clk);
      op = ($urandom_range(0, 1) == 0) ? CNT_IDLE : CNT_GATE;
      #1;
      for (int j = 0; j < NCELL; j++) begin
        checks++;
        if (take[j] !== ((op == CNT_GATE) ? mlast[j] : 1'b0)) begin
          failures++;
          if (failures < 10) $display("cell %0d op %s take=%b", j, op.name(), take[j]);
        end
      end
    end
    @(negedge clk);
    op = CNT_STEP;
    #1;
    for (int j = 0; j < NCELL; j++) begin
      automatic bit exp_take = (mcnt % (1 << mlg[j])) == 0;
      checks++;
      if (take[j] !== exp_take) begin
        failures++;
        if (failures < 10) $display("cell %0d step %0d take=%b exp %b", j, mcnt, take[j], exp_take);
      end
      if (take[j]) held[j] = entry;
      mlast[j] = exp_take;
    end
    mcnt++;
    @(negedge clk);
    op = CNT_IDLE;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // n = 16: two transforms, butterfly b meets twiddle entry b mod 8.
    init(3);
    for (int b = 0; b < 16; b++) begin
      step(b % 8);
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (held[j] != fft16[j][b % 8]) begin
          failures++;
          $display("n=16 cell %0d butterfly %0d holds w^%0d, expected w^%0d", j, b, held[j], fft16[j][b % 8]);
        end
      end
    end
    // Random sizes and re-initialisation part way through.
    for (int r = 0; r < 40; r++) begin
      init($urandom_range(0, 9));
      repeat ($urandom_range(1, 70)) step(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
