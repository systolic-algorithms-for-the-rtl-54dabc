// Crossbar of a cell: every destination takes, each cycle, the word of any
// one of the N_SRC = 6 sources, under control of the microinstruction.
//
// Sources (src_e): x-file, y-file, MPY result, ALU result, data-memory read
// data and the microcode literal. Destinations: x and y output latches, the
// two write ports of each register file, the data-memory write data and the
// data-memory address. The switch is combinational; every source is a
// register output, so no combinational loop closes through it. The set of
// sources and destinations is read from the cell datapath figure; the
// encoding is this design's own.
module crossbar
  import warp_pkg::*;
(
  input  word_t            src [N_SRC],
  input  src_e [N_DST-1:0] sel,
  output word_t            dst [N_DST]
);

  always_comb begin
    for (int d = 0; d < N_DST; d++) begin
      unique case (sel[d])
        SRC_XFILE: dst[d] = src[SRC_XFILE];
        SRC_YFILE: dst[d] = src[SRC_YFILE];
        SRC_MPY:   dst[d] = src[SRC_MPY];
        SRC_ALU:   dst[d] = src[SRC_ALU];
        SRC_MEM:   dst[d] = src[SRC_MEM];
        default:   dst[d] = src[SRC_LIT];
      endcase
    end
  end

endmodule
