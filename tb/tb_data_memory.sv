// Self-checking test of data_memory at its full 4K-word size: a write and a
// read every cycle at random addresses, compared with a reference array;
// read data are due one cycle after the address, a same-address read and
// write returns the old word, and address bits above 12 are ignored.
module tb_data_memory;
  import warp_pkg::*;

  logic clk = 0;
  logic we;
  logic [15:0] waddr, raddr;
  word_t wdata, rdata;
  word_t model [MEM_WORDS];
  int checks = 0, failures = 0;

  data_memory dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t want;
    for (int i = 0; i < MEM_WORDS; i++) begin
      @(negedge clk);
      we = 1; waddr = 16'(i); wdata = $urandom; raddr = '0; model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      if (c > 0) begin
        checks++;
        if (rdata !== want) failures++;
      end
      we    = 1'($urandom);
      waddr = 16'($urandom);
      raddr = (c % 5 == 0) ? waddr : 16'($urandom);
      wdata = $urandom;
      want  = model[raddr[11:0]];
      @(posedge clk);
      if (we) model[waddr[11:0]] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
