// Self-checking test of crossbar: every destination is set to every source
// in turn, and random configurations are checked against direct indexing.
module tb_crossbar;
  import warp_pkg::*;

  word_t src [N_SRC];
  src_e [N_DST-1:0] sel;
  word_t dst [N_DST];
  int checks = 0, failures = 0;

  crossbar dut (.src, .sel, .dst);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 1000; c++) begin
      for (int s = 0; s < N_SRC; s++) src[s] = $urandom;
      for (int d = 0; d < N_DST; d++)
        sel[d] = (c < N_SRC) ? src_e'((c + d) % N_SRC) : src_e'($urandom_range(N_SRC - 1));
      #1;
      for (int d = 0; d < N_DST; d++) begin
        checks++;
        if (dst[d] !== src[int'(sel[d])]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
