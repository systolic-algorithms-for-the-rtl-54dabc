// Pipelined 32-bit floating-point multiplier (the cell's MPY unit).
//
// A new multiplication may start every cycle; its product appears on `p`
// LAT cycles after the operands were presented on `a` and `b` (LAT = 5, the
// pipeline depth of the multiplier used in the prototype). The operation is
// IEEE-754 single precision with round-to-nearest-even. As a simplification
// of this design, subnormal operands are read as zero, results that would be
// subnormal are flushed to a signed zero, overflow gives infinity and any NaN
// result is the quiet NaN 0x7FC00000. The product is computed in one
// combinational step and then carried through LAT pipeline registers; a
// synthesis retimer is expected to spread the logic over the stages.
//
// Interface: a, b (operands), p (product, registered). Reset clears the
// pipeline to +0.
module fp_mul
  import warp_pkg::*;
#(
  parameter int unsigned LAT = FP_LAT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t a,
  input  word_t b,
  output word_t p
);

  function automatic word_t fmul(word_t x, word_t y);
    logic        s;
    logic [7:0]  ex, ey;
    logic [47:0] prod;
    logic [24:0] mant;
    logic        g, st;
    logic signed [10:0] e;
    s  = x[31] ^ y[31];
    ex = x[30:23];
    ey = y[30:23];
    if ((ex == 8'hFF && x[22:0] != 0) || (ey == 8'hFF && y[22:0] != 0))
      return 32'h7FC0_0000;
    if (ex == 8'hFF || ey == 8'hFF) begin
      if (ex == 8'h00 || ey == 8'h00) return 32'h7FC0_0000;  // inf * 0
      return {s, 8'hFF, 23'd0};
    end
    if (ex == 8'h00 || ey == 8'h00) return {s, 31'd0};
    prod = {24'd0, 1'b1, x[22:0]} * {24'd0, 1'b1, y[22:0]};
    e    = $signed({3'd0, ex}) + $signed({3'd0, ey}) - 11'sd127;
    if (prod[47]) begin
      mant = {1'b0, prod[47:24]};
      g    = prod[23];
      st   = |prod[22:0];
      e    = e + 11'sd1;
    end else begin
      mant = {1'b0, prod[46:23]};
      g    = prod[22];
      st   = |prod[21:0];
    end
    if (g && (st || mant[0])) mant = mant + 25'd1;
    if (mant[24]) begin
      mant = mant >> 1;
      e    = e + 11'sd1;
    end
    if (e >= 11'sd255) return {s, 8'hFF, 23'd0};
    if (e <= 11'sd0)   return {s, 31'd0};
    return {s, e[7:0], mant[22:0]};
  endfunction

  word_t stage [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) stage[i] <= '0;
    end else begin
      stage[0] <= fmul(a, b);
      for (int i = 1; i < LAT; i++) stage[i] <= stage[i-1];
    end
  end

  assign p = stage[LAT-1];

endmodule
