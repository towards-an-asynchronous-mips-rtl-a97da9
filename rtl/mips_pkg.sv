// mips_pkg: types and constants shared by the asynchronous MIPS pipeline.
//
// It holds the MIPS-I instruction field layout (the three formats I, J and R),
// the opcode and function codes of the implemented integer subset, and the
// payloads of the channels between the stages: the control bundle made by the
// decoder, the RegRead request (3 flag bits + 15 address bits), the RegPort
// outputs of the register bank (32-bit data + 2-bit forwarding control) and
// the RegWrite channel from write-back.  The RegRead and RegPort widths follow
// the design description; RegWrite here also carries the producer's 2-bit
// index and a write-enable bit, which is this design's addition (see dhdt).
//
// Every channel is a 2-phase bundled-data channel: the sender toggles req when
// new data is on the bus, the receiver toggles ack when it has taken it; the
// channel is busy while req != ack and the data must not change meanwhile.
package mips_pkg;

  // Opcodes (instr[31:26])
  localparam logic [5:0] OP_RTYPE = 6'h00, OP_REGIMM = 6'h01, OP_J    = 6'h02,
                         OP_JAL   = 6'h03, OP_BEQ    = 6'h04, OP_BNE  = 6'h05,
                         OP_BLEZ  = 6'h06, OP_BGTZ   = 6'h07, OP_ADDI = 6'h08,
                         OP_ADDIU = 6'h09, OP_SLTI   = 6'h0a, OP_SLTIU= 6'h0b,
                         OP_ANDI  = 6'h0c, OP_ORI    = 6'h0d, OP_XORI = 6'h0e,
                         OP_LUI   = 6'h0f, OP_LB     = 6'h20, OP_LH   = 6'h21,
                         OP_LW    = 6'h23, OP_LBU    = 6'h24, OP_LHU  = 6'h25,
                         OP_SB    = 6'h28, OP_SH     = 6'h29, OP_SW   = 6'h2b;

  // Function codes (instr[5:0]) of R-type instructions
  localparam logic [5:0] FN_SLL  = 6'h00, FN_SRL  = 6'h02, FN_SRA  = 6'h03,
                         FN_SLLV = 6'h04, FN_SRLV = 6'h06, FN_SRAV = 6'h07,
                         FN_JR   = 6'h08, FN_JALR = 6'h09, FN_MFHI = 6'h10,
                         FN_MTHI = 6'h11, FN_MFLO = 6'h12, FN_MTLO = 6'h13,
                         FN_MULT = 6'h18, FN_MULTU= 6'h19, FN_DIV  = 6'h1a,
                         FN_DIVU = 6'h1b, FN_ADD  = 6'h20, FN_ADDU = 6'h21,
                         FN_SUB  = 6'h22, FN_SUBU = 6'h23, FN_AND  = 6'h24,
                         FN_OR   = 6'h25, FN_XOR  = 6'h26, FN_NOR  = 6'h27,
                         FN_SLT  = 6'h2a, FN_SLTU = 6'h2b;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR, ALU_SLT, ALU_SLTU,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_t;

  typedef enum logic [2:0] {
    MD_NONE, MD_MULT, MD_MULTU, MD_DIV, MD_DIVU, MD_MTHI, MD_MTLO
  } md_op_t;

  // What the EXE stage puts on its result bus
  typedef enum logic [1:0] { RES_ALU, RES_HI, RES_LO, RES_LINK } res_sel_t;

  typedef enum logic [2:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ, BR_REG
  } br_t;

  typedef enum logic [1:0] { MS_BYTE, MS_HALF, MS_WORD } msize_t;

  // Forwarding control carried with each RegPort (2 bits)
  typedef enum logic [1:0] { FW_REG = 2'b00, FW_EX = 2'b01, FW_MEM = 2'b10 } fw_t;

  // Control bundle produced by the decoder; it follows the data down the pipe
  typedef struct packed {
    // EXE fields
    alu_op_t  alu_op;
    logic     b_imm;       // ALU operand B is the immediate
    logic     shamt_reg;   // shift amount from rs instead of the sa field
    md_op_t   md_op;
    res_sel_t res_sel;
    br_t      br;
    logic [31:0] imm;      // sign/zero extended immediate
    // MEM fields
    logic     mem_rd;
    logic     mem_wr;
    msize_t   msize;
    logic     mem_uns;     // zero-extend loaded byte/half
    // WB fields
    logic     we;
    logic [4:0] rd;
  } ctrl_t;

  // RegRead channel: 3 flag bits then three 5-bit register numbers (18 bits)
  typedef struct packed {
    logic     rd_rs;
    logic     rd_rt;
    logic     wr_rd;
    logic [4:0] rs;
    logic [4:0] rt;
    logic [4:0] rd;
  } regread_t;

  // RegPort0 / RegPort1: register data plus forwarding control (34 bits)
  typedef struct packed {
    logic [31:0] data;
    fw_t         fw;
  } regport_t;

  // RegWrite channel: write enable, index of the producing instruction,
  // register number and data
  typedef struct packed {
    logic        we;
    logic [1:0]  idx;
    logic [4:0]  rd;
    logic [31:0] data;
  } regwrite_t;

  // Fetched instruction with its address and colour
  typedef struct packed {
    logic [31:0] instr;
    logic [31:0] pc;
    logic        colour;
  } fetched_t;

  // Redirect of the instruction stream: new address and new colour
  typedef struct packed {
    logic [31:0] target;
    logic        colour;
  } redirect_t;

  // ID -> EXE bundle
  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] pc;
    logic [4:0]  sa;
    logic        colour;   // ID's colour, tells EXE about jumps
    regport_t    p0;
    regport_t    p1;
  } id_ex_t;

  // EXE -> MEM bundle
  typedef struct packed {
    logic [1:0]  idx;
    logic [31:0] res;      // ALU result or memory address
    logic [31:0] sdata;    // store data
    logic        mem_rd;
    logic        mem_wr;
    msize_t      msize;
    logic        mem_uns;
    logic        we;
    logic [4:0]  rd;
  } ex_mem_t;

  // MEM -> WB bundle
  typedef struct packed {
    logic [1:0]  idx;
    logic [31:0] alu_res;
    logic [31:0] mem_data;
    logic        is_load;
    logic        we;
    logic [4:0]  rd;
  } mem_wb_t;

  function automatic logic [31:0] sext16(input logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction

endpackage
