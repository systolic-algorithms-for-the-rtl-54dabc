// Self-checking test of in_mux: every select value of the x and y muxes
// with random data words.
module tb_in_mux;
  import warp_pkg::*;

  xin_e  xsel;
  yin_e  ysel;
  word_t x_left, x_wrap, y_left, y_right, y_wrap, x_in, y_in;
  int checks = 0, failures = 0;

  in_mux dut (.xsel, .ysel, .x_left, .x_wrap, .y_left, .y_right, .y_wrap, .x_in, .y_in);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 300; c++) begin
      x_left = $urandom; x_wrap = $urandom;
      y_left = $urandom; y_right = $urandom; y_wrap = $urandom;
      xsel = xin_e'(c % 2);
      ysel = yin_e'((c / 2) % 3);
      #1;
      checks += 2;
      if (x_in !== ((xsel == XIN_WRAP) ? x_wrap : x_left)) failures++;
      case (ysel)
        YIN_LEFT:  if (y_in !== y_left)  failures++;
        YIN_RIGHT: if (y_in !== y_right) failures++;
        default:   if (y_in !== y_wrap)  failures++;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
