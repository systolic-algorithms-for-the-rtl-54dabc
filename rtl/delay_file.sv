// x-file, y-file or addr-file of a cell: a FILE_DEPTH = 128-word register
// file with a write counter and a read counter.
//
// Each cycle the input word is written at the write counter (when ctl.we)
// and the word at the read counter is registered onto dout. With ctl.op =
// CTR_INC both counters advance every cycle, so the file is a programmable
// delay line: a word written in cycle t appears on dout in cycle t + D + 1,
// where D = (write counter - read counter) mod 128, for D = 1..127 (D = 0
// gives 129). CTR_LOAD sets the counters from the microinstruction for the
// next cycle, CTR_HOLD freezes them; together they make the file a scratchpad
// addressed by the microcode. The read is done before the write of the same
// cycle. The 128-word size and the self-incrementing counters follow the
// architecture overview; the registered read and the load/hold encoding are
// this design's choice. Reset sets both counters and dout to zero.
module delay_file
  import warp_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  file_ctl_t ctl,
  input  word_t     din,
  output word_t     dout
);

  word_t              mem [FILE_DEPTH];
  logic [FILE_AW-1:0] wptr, rptr;

  always_ff @(posedge clk) begin
    if (ctl.we) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
      dout <= '0;
    end else begin
      dout <= mem[rptr];
      unique case (ctl.op)
        CTR_INC: begin
          wptr <= wptr + 1'b1;
          rptr <= rptr + 1'b1;
        end
        CTR_LOAD: begin
          wptr <= ctl.wload;
          rptr <= ctl.rload;
        end
        default: ;  // CTR_HOLD
      endcase
    end
  end

endmodule
