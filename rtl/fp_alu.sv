// Pipelined 32-bit floating-point ALU (the cell's ALU unit).
//
// Operations (alu_op_e): a + b, a - b, pass a, pass b. A new operation may
// start every cycle; its result appears on `r` LAT cycles later (LAT = 5, as
// in the prototype's ALU). Arithmetic is IEEE-754 single precision with
// round-to-nearest-even; as this design's simplification subnormals are read
// as zero and subnormal results are flushed to zero, an exact zero difference
// is +0, and NaN results are the quiet NaN 0x7FC00000. The result is formed in
// one combinational step and carried through LAT pipeline registers.
//
// Interface: op, a, b (inputs of the issuing cycle), r (registered result).
// Reset clears the pipeline to +0.
module fp_alu
  import warp_pkg::*;
#(
  parameter int unsigned LAT = FP_LAT
) (
  input  logic    clk,
  input  logic    rst_n,
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   r
);

  function automatic word_t fadd(word_t x, word_t y);
    logic        sx, sy, sb;
    logic [7:0]  ex, ey, eb, es;
    logic [27:0] mb, ms, sum;    // hidden bit at 26, guard/round/sticky in 2:0
    logic [8:0]  d;
    logic        st;
    logic signed [10:0] e;
    int          lz;
    logic [24:0] mant;
    sx = x[31]; sy = y[31];
    ex = x[30:23]; ey = y[30:23];
    if ((ex == 8'hFF && x[22:0] != 0) || (ey == 8'hFF && y[22:0] != 0))
      return 32'h7FC0_0000;
    if (ex == 8'hFF && ey == 8'hFF)
      return (sx == sy) ? x : 32'h7FC0_0000;
    if (ex == 8'hFF) return x;
    if (ey == 8'hFF) return y;
    if (ex == 8'h00 && ey == 8'h00) return {sx & sy, 31'd0};
    if (ex == 8'h00) return y;
    if (ey == 8'h00) return x;
    // Order the operands by magnitude: b (big) and s (small).
    if (x[30:0] >= y[30:0]) begin
      sb = sx; eb = ex; es = ey;
      mb = {1'b0, 1'b1, x[22:0], 3'b000};
      ms = {1'b0, 1'b1, y[22:0], 3'b000};
    end else begin
      sb = sy; eb = ey; es = ex;
      mb = {1'b0, 1'b1, y[22:0], 3'b000};
      ms = {1'b0, 1'b1, x[22:0], 3'b000};
    end
    d = {1'b0, eb} - {1'b0, es};
    if (d >= 9'd27) begin
      ms = 28'd1;                           // only the sticky bit remains
    end else begin
      st = 1'b0;
      for (int i = 0; i < 27; i++)
        if (i < int'(d)) st = st | ms[i];
      ms = (ms >> d) | {27'd0, st};
    end
    e = $signed({3'd0, eb});
    if (sx == sy) begin
      sum = mb + ms;
      if (sum[27]) begin
        sum = (sum >> 1) | {27'd0, sum[0]};
        e   = e + 11'sd1;
      end
    end else begin
      sum = mb - ms;
      if (sum == 28'd0) return 32'h0000_0000;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      sum = sum << lz;
      e   = e - 11'(lz);
    end
    mant = {1'b0, sum[26:3]};
    if (sum[2] && (sum[1] || sum[0] || mant[0])) mant = mant + 25'd1;
    if (mant[24]) begin
      mant = mant >> 1;
      e    = e + 11'sd1;
    end
    if (e >= 11'sd255) return {sb, 8'hFF, 23'd0};
    if (e <= 11'sd0)   return {sb, 31'd0};
    return {sb, e[7:0], mant[22:0]};
  endfunction

  word_t res;
  always_comb begin
    unique case (op)
      ALU_ADD:   res = fadd(a, b);
      ALU_SUB:   res = fadd(a, {~b[31], b[30:0]});
      ALU_PASSA: res = a;
      default:   res = b;
    endcase
  end

  word_t stage [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) stage[i] <= '0;
    end else begin
      stage[0] <= res;
      for (int i = 1; i < LAT; i++) stage[i] <= stage[i-1];
    end
  end

  assign r = stage[LAT-1];

endmodule
