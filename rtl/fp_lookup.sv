// Look-up unit of the MPY register file: approximate inverse and inverse
// square root of a 32-bit floating-point word.
//
// mode = LUT_NONE passes the word through, LUT_RECIP returns about 1/x and
// LUT_RSQRT about 1/sqrt(x). The unit is combinational, so it sits on a
// register-file read path and its result starts a multiply in the same cycle.
// The result is a seed for Newton iterations done with the MPY and ALU:
// 1/x uses the top 8 fraction bits of x as a table index, 1/sqrt(x) the
// exponent parity and the top 7 fraction bits. Each 256-entry table holds the
// value at the centre of its interval (relative error below 2^-9) and is
// computed at elaboration with integer arithmetic:
//   recip[i] = 2^33 / (513 + 2i) - 2^23                (fraction of 2/m)
//   rsqrt[p][j] = isqrt(2^(56-p) / (257 + 2j)) - 2^23   (fraction of 2/sqrt(m*2^p))
// That the register file has such a look-up unit is from the architecture
// overview; the table sizes, indexing and special cases (0 -> inf, inf -> 0,
// negative or NaN -> NaN for the inverse square root) are this design's own.
module fp_lookup
  import warp_pkg::*;
(
  input  lut_e  mode,
  input  word_t x,
  output word_t y
);

  typedef logic [22:0] tab_t [256];

  function automatic longint unsigned isqrt(longint unsigned v);
    longint unsigned r, bitv;
    r    = 0;
    bitv = 64'd1 << 62;
    while (bitv > v) bitv = bitv >> 2;
    while (bitv != 0) begin
      if (v >= r + bitv) begin
        v = v - (r + bitv);
        r = (r >> 1) + bitv;
      end else begin
        r = r >> 1;
      end
      bitv = bitv >> 2;
    end
    return r;
  endfunction

  function automatic tab_t make_recip();
    tab_t t;
    for (int i = 0; i < 256; i++)
      t[i] = 23'((64'd1 << 33) / longint'(513 + 2 * i) - (64'd1 << 23));
    return t;
  endfunction

  function automatic tab_t make_rsqrt();
    tab_t t;
    for (int p = 0; p < 2; p++)
      for (int j = 0; j < 128; j++)
        t[p*128 + j] = 23'(isqrt((64'd1 << (56 - p)) / longint'(257 + 2 * j))
                           - (64'd1 << 23));
    return t;
  endfunction

  localparam tab_t RECIP_T = make_recip();
  localparam tab_t RSQRT_T = make_rsqrt();

  logic        s;
  logic [7:0]  e;
  logic [22:0] f;
  logic [7:0]  re;   // biased result exponent
  logic        odd;

  assign s   = x[31];
  assign e   = x[30:23];
  assign f   = x[22:0];
  assign odd = ~e[0];  // unbiased exponent e-127 is odd when e is even

  always_comb begin
    y  = x;
    re = '0;
    unique case (mode)
      LUT_RECIP: begin
        if (e == 8'hFF && f != 0) y = 32'h7FC0_0000;
        else if (e == 8'hFF)      y = {s, 31'd0};
        else if (e == 8'h00)      y = {s, 8'hFF, 23'd0};
        else if (e >= 8'd253)     y = {s, 31'd0};
        else begin
          re = 8'd253 - e;
          y  = {s, re[7:0], RECIP_T[f[22:15]]};
        end
      end
      LUT_RSQRT: begin
        if (e == 8'hFF && f != 0)      y = 32'h7FC0_0000;
        else if (e == 8'h00)           y = {s, 8'hFF, 23'd0};
        else if (s)                    y = 32'h7FC0_0000;
        else if (e == 8'hFF)           y = 32'd0;
        else begin
          // unbiased result = -floor((e-127)/2) - 1, biased by 127
          re = 8'((379 - int'(e) + (odd ? 1 : 0)) / 2);
          y  = {1'b0, re[7:0], RSQRT_T[{odd, f[22:16]}]};
        end
      end
      default: y = x;
    endcase
  end

endmodule
