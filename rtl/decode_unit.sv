// decode_unit: the main decoder of the ID stage.
//
// A purely combinational unit.  From one 32-bit instruction it produces the
// control bundle that travels with the instruction's data to EXE, MEM and WB
// (ALU and multiply/divide operation, immediate after sign or zero extension,
// branch kind, memory access, register write-back) and the 18-bit RegRead
// request for the register bank: three flags (read rs, read rt, write rd)
// followed by the three register numbers.  It also flags unconditional
// jumps (J, JAL), which the ID stage executes itself, and every control
// transfer, whose successor is a delay slot.  Centralised decode with
// distributed use of its fields follows the design description; the exact
// instruction subset (MIPS-I integer instructions without exceptions) and
// the bundle's encoding are this design's.  Unknown opcodes decode as NOPs.
module decode_unit
  import mips_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl,
  output regread_t    rread,
  output logic        is_jump,      // J or JAL: executed in ID
  output logic        is_transfer   // any jump or branch: next one is a delay slot
);
  logic [5:0] op, fn;
  logic [4:0] rs, rt, rd;
  assign op = instr[31:26];
  assign fn = instr[5:0];
  assign rs = instr[25:21];
  assign rt = instr[20:16];
  assign rd = instr[15:11];

  always_comb begin
    ctrl        = '0;
    ctrl.alu_op = ALU_ADD;
    ctrl.md_op  = MD_NONE;
    ctrl.res_sel= RES_ALU;
    ctrl.br     = BR_NONE;
    ctrl.msize  = MS_WORD;
    ctrl.imm    = sext16(instr[15:0]);
    rread       = '0;
    rread.rs    = rs;
    rread.rt    = rt;
    is_jump     = 1'b0;
    unique case (op)
      OP_RTYPE: begin
        rread.rd_rs = 1'b1;
        rread.rd_rt = 1'b1;
        ctrl.we     = 1'b1;
        ctrl.rd     = rd;
        unique case (fn)
          FN_ADD, FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_SLTU: ctrl.alu_op = ALU_SLTU;
          FN_SLL:  begin ctrl.alu_op = ALU_SLL; rread.rd_rs = 1'b0; end
          FN_SRL:  begin ctrl.alu_op = ALU_SRL; rread.rd_rs = 1'b0; end
          FN_SRA:  begin ctrl.alu_op = ALU_SRA; rread.rd_rs = 1'b0; end
          FN_SLLV: begin ctrl.alu_op = ALU_SLL; ctrl.shamt_reg = 1'b1; end
          FN_SRLV: begin ctrl.alu_op = ALU_SRL; ctrl.shamt_reg = 1'b1; end
          FN_SRAV: begin ctrl.alu_op = ALU_SRA; ctrl.shamt_reg = 1'b1; end
          FN_JR:   begin ctrl.br = BR_REG; ctrl.we = 1'b0; rread.rd_rt = 1'b0; end
          FN_JALR: begin ctrl.br = BR_REG; ctrl.res_sel = RES_LINK; rread.rd_rt = 1'b0; end
          FN_MFHI: begin ctrl.res_sel = RES_HI; rread.rd_rs = 1'b0; rread.rd_rt = 1'b0; end
          FN_MFLO: begin ctrl.res_sel = RES_LO; rread.rd_rs = 1'b0; rread.rd_rt = 1'b0; end
          FN_MTHI: begin ctrl.md_op = MD_MTHI; ctrl.we = 1'b0; rread.rd_rt = 1'b0; end
          FN_MTLO: begin ctrl.md_op = MD_MTLO; ctrl.we = 1'b0; rread.rd_rt = 1'b0; end
          FN_MULT: begin ctrl.md_op = MD_MULT;  ctrl.we = 1'b0; end
          FN_MULTU:begin ctrl.md_op = MD_MULTU; ctrl.we = 1'b0; end
          FN_DIV:  begin ctrl.md_op = MD_DIV;   ctrl.we = 1'b0; end
          FN_DIVU: begin ctrl.md_op = MD_DIVU;  ctrl.we = 1'b0; end
          default: begin ctrl.we = 1'b0; rread.rd_rs = 1'b0; rread.rd_rt = 1'b0; end
        endcase
      end
      OP_REGIMM: begin
        rread.rd_rs = 1'b1;
        ctrl.br = (rt[0]) ? BR_GEZ : BR_LTZ;
      end
      OP_J:   is_jump = 1'b1;
      OP_JAL: begin
        is_jump      = 1'b1;
        ctrl.we      = 1'b1;
        ctrl.rd      = 5'd31;
        ctrl.res_sel = RES_LINK;
      end
      OP_BEQ:  begin rread.rd_rs = 1'b1; rread.rd_rt = 1'b1; ctrl.br = BR_EQ;  end
      OP_BNE:  begin rread.rd_rs = 1'b1; rread.rd_rt = 1'b1; ctrl.br = BR_NE;  end
      OP_BLEZ: begin rread.rd_rs = 1'b1; ctrl.br = BR_LEZ; end
      OP_BGTZ: begin rread.rd_rs = 1'b1; ctrl.br = BR_GTZ; end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        rread.rd_rs = (op != OP_LUI);
        ctrl.b_imm  = 1'b1;
        ctrl.we     = 1'b1;
        ctrl.rd     = rt;
        unique case (op)
          OP_SLTI:  ctrl.alu_op = ALU_SLT;
          OP_SLTIU: ctrl.alu_op = ALU_SLTU;
          OP_ANDI:  begin ctrl.alu_op = ALU_AND; ctrl.imm = {16'h0, instr[15:0]}; end
          OP_ORI:   begin ctrl.alu_op = ALU_OR;  ctrl.imm = {16'h0, instr[15:0]}; end
          OP_XORI:  begin ctrl.alu_op = ALU_XOR; ctrl.imm = {16'h0, instr[15:0]}; end
          OP_LUI:   begin ctrl.alu_op = ALU_LUI; ctrl.imm = {16'h0, instr[15:0]}; end
          default:  ctrl.alu_op = ALU_ADD;
        endcase
      end
      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin
        rread.rd_rs  = 1'b1;
        ctrl.b_imm   = 1'b1;
        ctrl.mem_rd  = 1'b1;
        ctrl.we      = 1'b1;
        ctrl.rd      = rt;
        ctrl.mem_uns = (op == OP_LBU) || (op == OP_LHU);
        ctrl.msize   = (op == OP_LW) ? MS_WORD :
                       (op == OP_LH || op == OP_LHU) ? MS_HALF : MS_BYTE;
      end
      OP_SB, OP_SH, OP_SW: begin
        rread.rd_rs = 1'b1;
        rread.rd_rt = 1'b1;
        ctrl.b_imm  = 1'b1;
        ctrl.mem_wr = 1'b1;
        ctrl.msize  = (op == OP_SW) ? MS_WORD : (op == OP_SH) ? MS_HALF : MS_BYTE;
      end
      default: ;
    endcase
    rread.wr_rd = ctrl.we;
    rread.rd    = ctrl.rd;
  end

  assign is_transfer = is_jump || (ctrl.br != BR_NONE);
endmodule
