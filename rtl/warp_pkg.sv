// Shared types and constants of the Warp linear systolic array.
//
// Every cell is driven by one horizontal microinstruction per cycle
// (uinst_t). The microinstruction enters cell 1 on the control stream and is
// passed from cell to cell one cycle later, so every cell runs the same
// program, each one cycle behind its left neighbour. The word width (32-bit
// floating point), the 128-word x/y/addr files, the 4K-word data memory, the
// 32-word register files, the crossbar's six sources and eight destinations
// and the five-stage arithmetic pipelines follow the prototype described in
// the architecture overview; the per-cell FFT twiddle counter follows the
// FFT mapping. The field layout of the microinstruction, the
// operation encodings and the packing of a read/write address pair into one
// 32-bit word are this design's own choices.
package warp_pkg;

  localparam int unsigned WORD_W     = 32;   // 32-bit floating-point words
  localparam int unsigned FILE_DEPTH = 128;  // x-file, y-file, addr-file
  localparam int unsigned FILE_AW    = $clog2(FILE_DEPTH);
  localparam int unsigned MEM_WORDS  = 4096; // data memory, 4K words
  localparam int unsigned RF_WORDS   = 32;   // 32 x 32 register files
  localparam int unsigned RF_AW      = $clog2(RF_WORDS);
  localparam int unsigned FP_LAT     = 5;    // MPY and ALU pipeline depth

  typedef logic [WORD_W-1:0] word_t;

  // A read/write address pair for the data memory travels as one word:
  // the write address in the upper half, the read address in the lower half.
  typedef struct packed {
    logic [15:0] wr;
    logic [15:0] rd;
  } addr_pair_t;

  // Crossbar sources ("write ports"): the units that drive the crossbar.
  typedef enum logic [2:0] {
    SRC_XFILE = 3'd0,
    SRC_YFILE = 3'd1,
    SRC_MPY   = 3'd2,
    SRC_ALU   = 3'd3,
    SRC_MEM   = 3'd4,
    SRC_LIT   = 3'd5
  } src_e;
  localparam int unsigned N_SRC = 6;

  // Crossbar destinations ("read ports"): the consumers fed by the crossbar.
  localparam int unsigned DST_XOUT = 0;  // x output latch
  localparam int unsigned DST_YOUT = 1;  // y output latch
  localparam int unsigned DST_MPYA = 2;  // MPY register file, port A
  localparam int unsigned DST_MPYB = 3;  // MPY register file, port B
  localparam int unsigned DST_ALUA = 4;  // ALU register file, port A
  localparam int unsigned DST_ALUB = 5;  // ALU register file, port B
  localparam int unsigned DST_MEMD = 6;  // data memory write data
  localparam int unsigned DST_MEMA = 7;  // data memory address pair
  localparam int unsigned N_DST    = 8;

  typedef enum logic [0:0] { XIN_LEFT = 1'b0, XIN_WRAP = 1'b1 } xin_e;
  typedef enum logic [1:0] { YIN_LEFT = 2'd0, YIN_RIGHT = 2'd1, YIN_WRAP = 2'd2 } yin_e;

  // Counter operation of an x/y/addr file.
  typedef enum logic [1:0] {
    CTR_INC  = 2'd0,  // both counters advance: programmable delay
    CTR_HOLD = 2'd1,  // counters hold: scratchpad at fixed addresses
    CTR_LOAD = 2'd2   // counters are set from the microinstruction
  } ctr_e;

  typedef struct packed {
    logic               we;     // write the input word at the write counter
    ctr_e               op;
    logic [FILE_AW-1:0] wload;  // values for CTR_LOAD
    logic [FILE_AW-1:0] rload;
  } file_ctl_t;

  // Register file control: two write ports, two operand read ports.
  // An operand may instead take the crossbar word of this cycle (bypass).
  typedef struct packed {
    logic [1:0]       we;
    logic [RF_AW-1:0] wa0;
    logic [RF_AW-1:0] wa1;
    logic [RF_AW-1:0] ra0;
    logic [RF_AW-1:0] ra1;
    logic [1:0]       byp;
  } rf_ctl_t;

  typedef enum logic [1:0] { LUT_NONE = 2'd0, LUT_RECIP = 2'd1, LUT_RSQRT = 2'd2 } lut_e;

  typedef enum logic [1:0] {
    ALU_ADD   = 2'd0,
    ALU_SUB   = 2'd1,  // a - b
    ALU_PASSA = 2'd2,
    ALU_PASSB = 2'd3
  } alu_op_e;

  // Data memory address source (the 3:1 address mux).
  typedef enum logic [1:0] { MA_AFILE = 2'd0, MA_XBAR = 2'd1, MA_MEM = 2'd2 } mem_asel_e;

  // FFT twiddle counter (CNT) operation.
  typedef enum logic [1:0] {
    CNT_IDLE = 2'd0,
    CNT_INIT = 2'd1,  // literal[4:0] = log2 of cell 1's hold length; count = 0
    CNT_STEP = 2'd2,  // one butterfly: MPY RF port B writes only at a new hold period
    CNT_GATE = 2'd3   // port B write gated by the last STEP's decision, no count
  } cnt_e;

  typedef struct packed {
    src_e [N_DST-1:0] xbar;    // source of each crossbar destination
    word_t            literal; // microcode literal (crossbar source SRC_LIT)
    xin_e             xin;
    yin_e             yin;
    file_ctl_t        xf;
    file_ctl_t        yf;
    file_ctl_t        af;
    rf_ctl_t          mrf;
    lut_e             mlut;    // look-up applied to MPY operand A
    rf_ctl_t          arf;
    alu_op_e          alu_op;
    logic             mem_we;
    mem_asel_e        mem_asel;
    cnt_e             cnt;
  } uinst_t;

endpackage
