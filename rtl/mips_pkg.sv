// mips_pkg: types, encodings and control-word layout shared by the pipelined
// SIMD MIPS processor.
//
// The scalar (SISD) instructions use the standard MIPS32 opcode and funct
// numbers. The eleven SIMD instructions (MADDIU, MADDU, MMUL, MAND, MANDI,
// MOR, MORI, MXOR, MXORI, MLW, MSW) occupy opcode slots that MIPS32 leaves
// unused for this instruction subset; these numbers are this design's own
// choice. The SIMD register-register group shares opcode OP_MRTYPE and
// reuses the scalar funct numbers (ADDU/AND/OR/XOR), with MMUL at funct 0x18.
// The 5-bit ALUOP and the FSEL/MSEL encodings are likewise this design's.
package mips_pkg;

  typedef logic [31:0] word_t;
  typedef logic [4:0]  regidx_t;

  // ---------------------------------------------------------------- opcodes
  localparam logic [5:0] OP_SPECIAL  = 6'h00;
  localparam logic [5:0] OP_REGIMM   = 6'h01;
  localparam logic [5:0] OP_J        = 6'h02;
  localparam logic [5:0] OP_JAL      = 6'h03;
  localparam logic [5:0] OP_BEQ      = 6'h04;
  localparam logic [5:0] OP_BNE      = 6'h05;
  localparam logic [5:0] OP_ADDIU    = 6'h09;
  localparam logic [5:0] OP_SLTI     = 6'h0A;
  localparam logic [5:0] OP_SLTIU    = 6'h0B;
  localparam logic [5:0] OP_ANDI     = 6'h0C;
  localparam logic [5:0] OP_ORI      = 6'h0D;
  localparam logic [5:0] OP_XORI     = 6'h0E;
  localparam logic [5:0] OP_LUI      = 6'h0F;
  localparam logic [5:0] OP_SPECIAL2 = 6'h1C;  // MUL lives here (MIPS32)
  localparam logic [5:0] OP_LW       = 6'h23;
  localparam logic [5:0] OP_SW       = 6'h2B;
  // SIMD group (this design's numbering)
  localparam logic [5:0] OP_MRTYPE   = 6'h1E;  // MADDU/MAND/MOR/MXOR/MMUL
  localparam logic [5:0] OP_MADDIU   = 6'h19;
  localparam logic [5:0] OP_MANDI    = 6'h1A;
  localparam logic [5:0] OP_MORI     = 6'h1B;
  localparam logic [5:0] OP_MXORI    = 6'h1D;
  localparam logic [5:0] OP_MLW      = 6'h33;
  localparam logic [5:0] OP_MSW      = 6'h3B;

  // ------------------------------------------------------------------ functs
  localparam logic [5:0] FN_SLL   = 6'h00;
  localparam logic [5:0] FN_SRL   = 6'h02;
  localparam logic [5:0] FN_SRA   = 6'h03;
  localparam logic [5:0] FN_JR    = 6'h08;
  localparam logic [5:0] FN_BREAK = 6'h0D;
  localparam logic [5:0] FN_MMUL  = 6'h18;  // in the OP_MRTYPE group
  localparam logic [5:0] FN_ADDU  = 6'h21;
  localparam logic [5:0] FN_SUBU  = 6'h23;
  localparam logic [5:0] FN_AND   = 6'h24;
  localparam logic [5:0] FN_OR    = 6'h25;
  localparam logic [5:0] FN_XOR   = 6'h26;
  localparam logic [5:0] FN_SLT   = 6'h2A;
  localparam logic [5:0] FN_SLTU  = 6'h2B;
  localparam logic [5:0] FN2_MUL  = 6'h02;  // in the OP_SPECIAL2 group

  // REGIMM rt field
  localparam logic [4:0] RT_BLTZ = 5'd0;
  localparam logic [4:0] RT_BGEZ = 5'd1;

  localparam word_t NOP = 32'h0000_0000;  // SLL $0,$0,0

  // --------------------------------------------------------- control enums
  // ALUOP: 5-bit code from the main control unit to the ALU control unit.
  typedef enum logic [4:0] {
    AOP_RTYPE = 5'd0,   // operation given by funct
    AOP_ADD   = 5'd1,
    AOP_AND   = 5'd2,
    AOP_OR    = 5'd3,
    AOP_XOR   = 5'd4,
    AOP_SLT   = 5'd5,
    AOP_SLTU  = 5'd6,
    AOP_LUI   = 5'd7,
    AOP_MUL   = 5'd8,
    AOP_LINK  = 5'd9
  } aluop_e;

  // FSEL: ALU function
  typedef enum logic [2:0] {
    FSEL_ADD = 3'd0,
    FSEL_SUB = 3'd1,
    FSEL_AND = 3'd2,
    FSEL_OR  = 3'd3,
    FSEL_XOR = 3'd4,
    FSEL_LUI = 3'd5
  } fsel_e;

  // MSEL: which EX unit drives the stage result
  typedef enum logic [2:0] {
    MSEL_ALU   = 3'd0,
    MSEL_SHIFT = 3'd1,
    MSEL_COMP  = 3'd2,
    MSEL_MUL   = 3'd3,
    MSEL_LINK  = 3'd4
  } msel_e;

  // Branch / jump kind, evaluated in ID
  typedef enum logic [2:0] {
    BJ_NONE = 3'd0,
    BJ_BEQ  = 3'd1,
    BJ_BNE  = 3'd2,
    BJ_BLTZ = 3'd3,
    BJ_BGEZ = 3'd4,
    BJ_J    = 3'd5,
    BJ_JR   = 3'd6
  } bj_e;

  typedef enum logic [1:0] {
    DST_RT  = 2'd0,
    DST_RD  = 2'd1,
    DST_R31 = 2'd2
  } regdst_e;

  typedef enum logic {
    EXT_ZERO = 1'b0,
    EXT_SIGN = 1'b1
  } ext_e;

  // ID-stage operand source chosen by the hazard unit
  typedef enum logic [1:0] {
    FWD_RF  = 2'd0,   // register bank (write-through covers WB)
    FWD_EX  = 2'd1,   // result being computed in EX
    FWD_MEM = 2'd2    // result held in EX/MEM
  } fwd_e;

  // Decoded control word (Table 1 signals plus SIMD and hazard bookkeeping)
  typedef struct packed {
    logic    regwrite;    // REGWRITE  scalar register write
    logic    memtoreg;    // MEMTOREG  scalar load
    logic    memwrite;    // MEMWRITE  scalar store
    logic    mregwrite;   // MREGWRITE vector register write
    logic    mmemtoreg;   // MMEMTOREG vector load
    logic    mmemwrite;   // MMEMWRITE vector store
    logic    isbj;        // ISBJ      branch or jump
    bj_e     bjtype;
    logic    isjal;       // ISJAL
    logic    breakpoint;  // BREAKPOINT
    aluop_e  aluop;       // ALUOP
    logic    alusrc;      // ALUSRC    1: B operand is the extended immediate
    regdst_e regdst;      // REGDST
    ext_e    extctrl;     // EXTCTRL
    logic    use_rs;      // rs is read
    logic    use_rt;      // rt is read
    logic    rs_vec;      // rs names a vector (lane) register
    logic    rt_vec;      // rt names a vector (lane) register
  } ctrl_t;

endpackage
