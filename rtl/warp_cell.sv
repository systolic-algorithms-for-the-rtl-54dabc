// One Warp cell: a horizontally microcoded 32-bit floating-point datapath.
//
// Data path (following the cell datapath figure): the x input passes a 2:1
// mux (left neighbour or own x output: wraparound) into the x-file; the y
// input passes a 3:1 mux (left neighbour, right neighbour, own y output) into
// the y-file; the address stream enters the addr-file. The file outputs, the
// MPY and ALU results, the data-memory read data and the microcode literal
// are the six sources of a crossbar whose eight destinations are the x and y
// output latches, the two write ports of the MPY and of the ALU register
// files, and the data-memory write data and address. The data-memory address
// pair comes from a 3:1 mux: addr-file, crossbar, or the memory's own read
// data (indirect addressing); the selected pair is also the cell's outgoing
// address stream. The MPY register file's operand A passes the look-up unit.
// A twiddle counter (twiddle_cnt) can gate writes into the MPY register file
// so that, in an FFT, each cell keeps a twiddle factor from the x stream for
// as many butterflies as its stage requires; CELL_INDEX tells it the stage.
//
// Control: the whole cell obeys the microinstruction on cntl_in in the same
// cycle, and passes it on registered to cntl_out, so a neighbour executes it
// one cycle later, as data and control flow the same way through the array.
//
// Timing: file delays are programmable (see delay_file); MPY and ALU take
// FP_LAT = 5 cycles; memory reads take one cycle; the x, y and address
// outputs are registered, one cycle after the crossbar. A word entering on
// x_left therefore leaves on x_out D + 2 cycles later when the x-file runs as
// a delay of D and the crossbar routes the x-file to the x output.
// The units, their sizes and their connections follow the architecture
// overview; the microinstruction format, the register placement and the
// reset of pipelines, counters and output latches to zero are this design's.
module warp_cell
  import warp_pkg::*;
#(
  parameter int unsigned CELL_INDEX = 0  // position in the array, 0 = leftmost
) (
  input  logic   clk,
  input  logic   rst_n,
  input  uinst_t cntl_in,
  input  word_t  x_left,
  input  word_t  y_left,
  input  word_t  y_right,
  input  word_t  addr_left,
  output uinst_t cntl_out,
  output word_t  x_out,
  output word_t  y_out,
  output word_t  addr_out
);

  uinst_t u;
  assign u = cntl_in;

  word_t x_in, y_in;
  word_t xf_q, yf_q, af_q;
  word_t mpy_q, alu_q, mem_q;
  word_t src [N_SRC];
  word_t dst [N_DST];
  word_t m_op0, m_op1, m_a, a_op0, a_op1;
  addr_pair_t apair;

  in_mux u_in_mux (
    .xsel   (u.xin),
    .ysel   (u.yin),
    .x_left (x_left),
    .x_wrap (x_out),
    .y_left (y_left),
    .y_right(y_right),
    .y_wrap (y_out),
    .x_in   (x_in),
    .y_in   (y_in)
  );

  delay_file u_xfile (.clk, .rst_n, .ctl(u.xf), .din(x_in),      .dout(xf_q));
  delay_file u_yfile (.clk, .rst_n, .ctl(u.yf), .din(y_in),      .dout(yf_q));
  delay_file u_afile (.clk, .rst_n, .ctl(u.af), .din(addr_left), .dout(af_q));

  always_comb begin
    src[SRC_XFILE] = xf_q;
    src[SRC_YFILE] = yf_q;
    src[SRC_MPY]   = mpy_q;
    src[SRC_ALU]   = alu_q;
    src[SRC_MEM]   = mem_q;
    src[SRC_LIT]   = u.literal;
  end

  crossbar u_xbar (.src(src), .sel(u.xbar), .dst(dst));

  // FFT twiddle counter: in CNT_STEP and CNT_GATE cycles it gates write
  // port B of the MPY register file, so that each cell keeps a twiddle factor
  // from the x stream for as many butterflies as its FFT stage needs.
  logic    take;
  rf_ctl_t mrf_ctl;

  twiddle_cnt #(.CELL_INDEX(CELL_INDEX)) u_cnt (
    .clk, .rst_n, .op(u.cnt), .log_hold1(u.literal[4:0]), .take(take)
  );

  always_comb begin
    mrf_ctl = u.mrf;
    if (u.cnt == CNT_STEP || u.cnt == CNT_GATE) mrf_ctl.we[1] = u.mrf.we[1] & take;
  end

  regfile u_mrf (
    .clk, .ctl(mrf_ctl), .wd0(dst[DST_MPYA]), .wd1(dst[DST_MPYB]),
    .op0(m_op0), .op1(m_op1)
  );

  fp_lookup u_lut (.mode(u.mlut), .x(m_op0), .y(m_a));

  fp_mul u_mpy (.clk, .rst_n, .a(m_a), .b(m_op1), .p(mpy_q));

  regfile u_arf (
    .clk, .ctl(u.arf), .wd0(dst[DST_ALUA]), .wd1(dst[DST_ALUB]),
    .op0(a_op0), .op1(a_op1)
  );

  fp_alu u_alu (.clk, .rst_n, .op(u.alu_op), .a(a_op0), .b(a_op1), .r(alu_q));

  always_comb begin
    unique case (u.mem_asel)
      MA_XBAR: apair = addr_pair_t'(dst[DST_MEMA]);
      MA_MEM:  apair = addr_pair_t'(mem_q);
      default: apair = addr_pair_t'(af_q);
    endcase
  end

  data_memory u_mem (
    .clk,
    .we   (u.mem_we),
    .waddr(apair.wr),
    .wdata(dst[DST_MEMD]),
    .raddr(apair.rd),
    .rdata(mem_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cntl_out <= '0;
      x_out    <= '0;
      y_out    <= '0;
      addr_out <= '0;
    end else begin
      cntl_out <= cntl_in;
      x_out    <= dst[DST_XOUT];
      y_out    <= dst[DST_YOUT];
      addr_out <= word_t'(apair);
    end
  end

endmodule
