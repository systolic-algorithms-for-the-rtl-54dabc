// Self-checking test of delay_file: programmable delays of 2, 5, 17 and 128
// cycles (pointer offsets 1, 4, 16 and 127), then scratchpad use with loaded
// and held counters. Expected words come from a record of what was written.
module tb_delay_file;
  import warp_pkg::*;

  logic clk = 0, rst_n = 0;
  file_ctl_t ctl;
  word_t din, dout;
  int checks = 0, failures = 0;
  word_t hist [int];

  delay_file dut (.clk, .rst_n, .ctl, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_delay(int d);
    int delay = d + 1;
    // load the counters, then stream
    @(negedge clk);
    ctl = '0; ctl.op = CTR_LOAD; ctl.wload = FILE_AW'(d); ctl.rload = '0;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      // dout now shows what the file registered at the last edge
      if (c > delay) begin
        checks++;
        if (dout !== hist[c - delay]) begin
          failures++;
          if (failures < 10) $display("delay %0d: cycle %0d got %h want %h", delay, c, dout, hist[c-delay]);
        end
      end
      ctl = '0; ctl.we = 1'b1; ctl.op = CTR_INC;
      din = $urandom; hist[c] = din;
    end
  endtask

  initial begin
    ctl = '0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (dout !== 32'd0) failures++;
    run_delay(1);
    run_delay(4);
    run_delay(16);
    run_delay(127);
    // scratchpad: write words at addresses 10..19 with loaded counters
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      ctl = '0; ctl.op = CTR_LOAD; ctl.wload = FILE_AW'(10 + i); ctl.rload = '0;
      @(negedge clk);
      ctl = '0; ctl.we = 1'b1; ctl.op = CTR_HOLD; din = 32'hA000_0000 + i;
    end
    for (int i = 9; i >= 0; i--) begin
      @(negedge clk);
      ctl = '0; ctl.op = CTR_LOAD; ctl.wload = '0; ctl.rload = FILE_AW'(10 + i);
      @(negedge clk);
      ctl = '0; ctl.op = CTR_HOLD;   // read at the held counter
      @(negedge clk);
      checks++;
      if (dout !== 32'hA000_0000 + i) begin
        failures++;
        $display("scratchpad %0d: got %h", i, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
