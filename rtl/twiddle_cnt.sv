// FFT twiddle counter of a cell (the CNT of the FFT mapping).
//
// In the constant-geometry FFT, cell i computes stage i. The powers of the
// root of unity w^0, w^1, ... travel past all cells on the x stream, one per
// butterfly, and cell i must keep one of them for n/2^i consecutive
// butterflies before taking the next: for n = 16, cell 1 keeps w^0 for all
// eight butterflies, cell 2 keeps w^0 then w^4 for four each, cell 3 keeps
// w^0, w^2, w^4, w^6 for two each, and cell 4 takes every entry. This counter
// makes that decision. CNT_INIT clears the butterfly count and sets the hold
// length to 2^(log_hold1 - CELL_INDEX) (at least 1), where log_hold1 is the
// log2 of cell 1's hold length, log2(n/2), given as a microcode literal, and
// CELL_INDEX is the cell's 0-based position in the array. In every CNT_STEP
// cycle the count advances, and `take` is high when the count is at the start
// of a hold period; the cell then lets the microinstruction's write of the
// twiddle register in the MPY register file happen, and suppresses it
// otherwise. A twiddle factor is complex, two words on the x stream: in a
// CNT_GATE cycle `take` repeats the decision of the last STEP without
// counting, so the second word is kept or dropped with the first. `take` is
// combinational in the STEP or GATE cycle and low otherwise.
// That a counter at each cell controls the buffering is from the FFT mapping;
// deriving the hold length from the cell position and the INIT/STEP
// encoding are this design's own.
module twiddle_cnt
  import warp_pkg::*;
#(
  parameter int unsigned CELL_INDEX = 0,
  parameter int unsigned CW         = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cnt_e       op,
  input  logic [4:0] log_hold1,
  output logic       take
);

  logic [CW-1:0] cnt, mask;
  logic [4:0]    lg;
  logic          fresh, last;

  always_comb begin
    if (int'(log_hold1) > int'(CELL_INDEX)) lg = 5'(int'(log_hold1) - int'(CELL_INDEX));
    else                                    lg = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      mask <= '0;
      last <= 1'b0;
    end else begin
      unique case (op)
        CNT_INIT: begin
          cnt  <= '0;
          mask <= CW'((32'd1 << lg) - 32'd1);
          last <= 1'b0;
        end
        CNT_STEP: begin
          cnt  <= cnt + 1'b1;
          last <= fresh;
        end
        default: ;
      endcase
    end
  end

  assign fresh = (cnt & mask) == '0;
  assign take  = (op == CNT_STEP) ? fresh : (op == CNT_GATE) ? last : 1'b0;

endmodule
