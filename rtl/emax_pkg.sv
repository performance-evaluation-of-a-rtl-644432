// emax_pkg: types and constants shared by the EMAX array blocks.
//
// EMAX is a coarse-grained array of processing elements (PEs). Each PE runs
// one instruction (Fig. 4 style: "@row,col,dist [count] ALU_OP RGI & MEM_OP
// RGI LMM_CONTROL") for `count` iterations. This package holds the operation
// codes of the EX1 and EX2 units (names follow the mnemonics), the per-PE
// instruction word `pe_cfg_t` and the sizes used across the design.
//
// The operation names are the document's; their binary encoding, the
// register-slot operand scheme and the field widths are this design's own.
package emax_pkg;

  // Data word of the datapath: one LMM word, one FP64 value.
  localparam int unsigned DW = 64;
  // Register slots that travel down the array with every iteration.
  localparam int unsigned NREG = 16;
  localparam int unsigned RSW  = $clog2(NREG + 1);  // slot index, NREG = RGI constant
  // Words of an 8 KB local memory.
  localparam int unsigned LMM_WORDS = 1024;
  localparam int unsigned LAW = $clog2(LMM_WORDS);
  // Depth of an LMM_FIFO (neighbour window).
  localparam int unsigned FIFO_DEPTH = 8;
  localparam int unsigned TAPW = $clog2(FIFO_DEPTH);
  // Iteration counter width (count <= LMM_WORDS).
  localparam int unsigned CW = 11;

  typedef logic [DW-1:0] word_t;

  // EX1 operations (Fig. 4(b)).
  typedef enum logic [4:0] {
    EX1_NOP   = 5'd0,   // pass X
    EX1_ADD   = 5'd1,   // 32 bit X+Y
    EX1_ADD3  = 5'd2,   // 32 bit X+Y+Z
    EX1_SUB   = 5'd3,   // 32 bit X-Y
    EX1_SUB3  = 5'd4,   // 32 bit X-Y-Z
    EX1_MAUH  = 5'd5,   // 16bit[2] X+Y
    EX1_MAUH3 = 5'd6,   // 16bit[2] X+Y+Z
    EX1_MSUH  = 5'd7,   // 16bit[2] X-Y
    EX1_MSUH3 = 5'd8,   // 16bit[2] X-Y-Z
    EX1_MLUH  = 5'd9,   // 16bit[2] X * Y[8:0]
    EX1_MH2BW = 5'd10,  // merge four saturated 16-bit lanes into bytes
    EX1_MMAX  = 5'd11,  // 16bit[2] max(X,Y)
    EX1_MMAX3 = 5'd12,  // 16bit[2] max(X,Y,Z)
    EX1_MMIN  = 5'd13,  // 16bit[2] min(X,Y)
    EX1_MMIN3 = 5'd14,  // 16bit[2] min(X,Y,Z)
    EX1_MMID3 = 5'd15,  // 16bit[2] median(X,Y,Z)
    EX1_FMUL  = 5'd16,  // FP64 X*Y
    EX1_FADD  = 5'd17,  // FP64 X+Y
    EX1_FMA3  = 5'd18   // FP64 X + Y*Z
  } ex1_op_e;

  // EX2 operations (Fig. 4(c)).
  typedef enum logic [2:0] {
    EX2_NOP   = 3'd0,   // pass the EX1 result
    EX2_AND   = 3'd1,
    EX2_OR    = 3'd2,
    EX2_XOR   = 3'd3,
    EX2_MAUH  = 3'd4,   // 16bit[2] X+Y
    EX2_MSUH  = 3'd5    // 16bit[2] X-Y
  } ex2_op_e;

  // Operand field selection {f,h,l} of 16bit[2] operations.
  typedef enum logic [1:0] {
    FHL_F = 2'd0,  // full word
    FHL_H = 2'd1,  // byte3,byte2 -> H16,L16
    FHL_L = 2'd2   // byte1,byte0 -> H16,L16
  } fhl_e;

  // Width of a load or store (Fig. 4(d): ldb/ldub/ldh/lduh/ld, stb/sth/st).
  typedef enum logic [2:0] {
    MW_B  = 3'd0,  // signed byte
    MW_UB = 3'd1,  // unsigned byte
    MW_H  = 3'd2,  // signed half
    MW_UH = 3'd3,  // unsigned half
    MW_W  = 3'd4,  // 32-bit word, zero extended
    MW_D  = 3'd5   // 64-bit word
  } mwidth_e;

  // When the controller prefetches this PE's LMM from DDR3.
  typedef enum logic [1:0] {
    PF_NONE  = 2'd0,  // never (computed or reused data)
    PF_FIRST = 2'd1,  // only before the first activation
    PF_EVERY = 2'd2   // before every activation
  } pf_mode_e;

  // One PE instruction.
  typedef struct packed {
    // EX1: Z/Y/X operand slots (NREG selects the RGI constant)
    ex1_op_e        ex1_op;
    logic [RSW-1:0] xs, ys, zs;
    fhl_e           xf, yf, zf;
    // EX2: X is the EX1 result, Y is a slot or the RGI constant
    ex2_op_e        ex2_op;
    logic [RSW-1:0] ys2;
    logic [3:0]     sh;        // per-16-bit-lane arithmetic right shift (">Mn")
    logic           alu_en;    // write the ALU result to slot alu_dst
    logic [RSW-2:0] alu_dst;
    word_t          rgi;       // RGI constant of the ALU
    // memory operation
    logic           ld_en;     // load from LMM_FIFO tap into slot ld_dst
    mwidth_e        mw;
    logic [RSW-2:0] ld_dst;
    logic [TAPW-1:0] ld_tap;   // FIFO position = lead - own offset
    logic           fifo_bus;  // 1: FIFO fed by the row data path, 0: by own LMM
    logic           lmm_rd;    // stream own LMM (EAG) during execution
    logic           bus_drv;   // drive own LMM read data onto the row data path
    logic [CW-1:0]  lead;      // words the stream runs ahead of the iteration
    logic           st_en;     // store the ALU result to own LMM
    logic [LAW-1:0] base;      // EAG base word address (RGI of MEM_OP)
    logic [LAW-1:0] stride;    // EAG increment in words
    // LMM control: DMA between DDR3 and this LMM
    pf_mode_e       pf;
    logic [31:0]    ddr_addr;  // DDR3 word address at the first activation
    logic [31:0]    ddr_step;  // added per activation
    logic [CW-1:0]  dlen;      // words moved by the DMA
    logic           drain;     // copy dlen LMM words to DDR3 after execution
  } pe_cfg_t;

endpackage
