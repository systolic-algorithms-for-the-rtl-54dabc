// General register file in front of an arithmetic unit (the MPY register
// file and the ALU register file of a cell).
//
// RF_WORDS = 32 words of 32 bits. Two write ports take words from the
// crossbar; two read ports deliver the two operands of the unit. Reads are
// combinational (flow-through), writes take effect at the clock edge, so a
// read of a register written in the same cycle returns the old value. Each
// operand can instead take the crossbar word of the current cycle directly
// (ctl.byp[k]), which is how a stream value such as x enters the multiplier
// without first being stored. When both write ports name the same register,
// port 1 wins. The 32 x 32 size is the prototype's; the prototype's register
// file is a six-port part, of which this design uses the four ports the cell
// datapath draws (two in from the crossbar, two out to the unit); the bypass
// is this design's own.
module regfile
  import warp_pkg::*;
(
  input  logic    clk,
  input  rf_ctl_t ctl,
  input  word_t   wd0,
  input  word_t   wd1,
  output word_t   op0,
  output word_t   op1
);

  word_t mem [RF_WORDS];

  always_ff @(posedge clk) begin
    if (ctl.we[0]) mem[ctl.wa0] <= wd0;
    if (ctl.we[1]) mem[ctl.wa1] <= wd1;
  end

  assign op0 = ctl.byp[0] ? wd0 : mem[ctl.ra0];
  assign op1 = ctl.byp[1] ? wd1 : mem[ctl.ra1];

endmodule
