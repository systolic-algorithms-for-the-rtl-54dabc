// Local data memory of a cell: WORDS words (4K in the prototype), one read
// and one write in every cycle.
//
// The write stores wdata at waddr at the clock edge when we is set; the read
// registers the word at raddr onto rdata, so read data appear one cycle after
// the address. A read and a write of the same address in one cycle return the
// old word. Address inputs are 16 bits wide (the halves of an address pair);
// only the low $clog2(WORDS) bits are used, so the memory may be enlarged to
// 16K words by changing WORDS. The memory contents are not reset.
module data_memory
  import warp_pkg::*;
#(
  parameter int unsigned WORDS = MEM_WORDS
) (
  input  logic        clk,
  input  logic        we,
  input  logic [15:0] waddr,
  input  word_t       wdata,
  input  logic [15:0] raddr,
  output word_t       rdata
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW-1:0]] <= wdata;
    rdata <= mem[raddr[AW-1:0]];
  end

  // Upper address bits beyond the memory size are ignored by design.
  logic unused_addr;
  assign unused_addr = ^{waddr[15:AW], raddr[15:AW]};

endmodule
