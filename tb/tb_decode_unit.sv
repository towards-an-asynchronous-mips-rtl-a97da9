// tb_decode_unit: self-checking test of the main decoder.
// A table of instructions, written field by field here, with the control
// fields and RegRead flags each must produce, worked out from the MIPS-I
// definitions: register numbers, flags, immediates (sign or zero extended),
// ALU, multiply/divide, branch and memory fields, and the jump flags.
//
// Expected fields follow the MIPS-I encodings and the control bundle of this
// design.
module tb_decode_unit;
  import mips_pkg::*;
  logic [31:0] instr;
  ctrl_t ctrl;
  regread_t rread;
  logic is_jump, is_transfer;
  int checks = 0, failures = 0;

  decode_unit dut (.*);

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%h %s: got %h expected %h", instr, what, got, exp);
    end
  endtask

  initial begin
    fork begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    // sub $2,$1,$3
    instr = {6'h0, 5'd1, 5'd3, 5'd2, 5'd0, 6'h22}; #1;
    chk("alu", ctrl.alu_op, ALU_SUB); chk("we", ctrl.we, 1); chk("rd", ctrl.rd, 2);
    chk("flags", {rread.rd_rs, rread.rd_rt, rread.wr_rd}, 3'b111);
    chk("regs", {rread.rs, rread.rt, rread.rd}, {5'd1, 5'd3, 5'd2});
    chk("jump", {is_jump, is_transfer}, 2'b00);
    // sll $4,$5,7 : reads only rt
    instr = {6'h0, 5'd0, 5'd5, 5'd4, 5'd7, 6'h00}; #1;
    chk("alu", ctrl.alu_op, ALU_SLL); chk("flags", {rread.rd_rs, rread.rd_rt, rread.wr_rd}, 3'b011);
    chk("shreg", ctrl.shamt_reg, 0);
    // srav $4,$5,$6
    instr = {6'h0, 5'd6, 5'd5, 5'd4, 5'd0, 6'h07}; #1;
    chk("alu", ctrl.alu_op, ALU_SRA); chk("shreg", ctrl.shamt_reg, 1);
    // addi $7,$8,-3
    instr = {6'h08, 5'd8, 5'd7, 16'hFFFD}; #1;
    chk("imm", ctrl.imm, 32'hFFFF_FFFD); chk("bimm", ctrl.b_imm, 1); chk("rd", ctrl.rd, 7);
    chk("flags", {rread.rd_rs, rread.rd_rt, rread.wr_rd}, 3'b101);
    // ori $7,$8,0x8001 zero-extends
    instr = {6'h0d, 5'd8, 5'd7, 16'h8001}; #1;
    chk("imm", ctrl.imm, 32'h0000_8001); chk("alu", ctrl.alu_op, ALU_OR);
    // lui $9,0x1234 reads nothing
    instr = {6'h0f, 5'd0, 5'd9, 16'h1234}; #1;
    chk("alu", ctrl.alu_op, ALU_LUI); chk("flags", {rread.rd_rs, rread.rd_rt, rread.wr_rd}, 3'b001);
    // lbu $10,5($11)
    instr = {6'h24, 5'd11, 5'd10, 16'd5}; #1;
    chk("mem", {ctrl.mem_rd, ctrl.mem_wr, ctrl.mem_uns}, 3'b101); chk("size", ctrl.msize, MS_BYTE);
    chk("rd", ctrl.rd, 10);
    // sw $15,100($2): reads both, writes none
    instr = {6'h2b, 5'd2, 5'd15, 16'd100}; #1;
    chk("mem", {ctrl.mem_rd, ctrl.mem_wr}, 2'b01); chk("size", ctrl.msize, MS_WORD);
    chk("flags", {rread.rd_rs, rread.rd_rt, rread.wr_rd}, 3'b110);
    // sh
    instr = {6'h29, 5'd2, 5'd15, 16'd100}; #1;
    chk("size", ctrl.msize, MS_HALF);
    // beq $1,$2,-4
    instr = {6'h04, 5'd1, 5'd2, 16'hFFFC}; #1;
    chk("br", ctrl.br, BR_EQ); chk("we", ctrl.we, 0); chk("jump", {is_jump, is_transfer}, 2'b01);
    // bgez $3 (regimm rt=1), bltz (rt=0)
    instr = {6'h01, 5'd3, 5'd1, 16'd4}; #1; chk("br", ctrl.br, BR_GEZ);
    instr = {6'h01, 5'd3, 5'd0, 16'd4}; #1; chk("br", ctrl.br, BR_LTZ);
    instr = {6'h05, 5'd3, 5'd4, 16'd4}; #1; chk("br", ctrl.br, BR_NE); chk("rd_rt", rread.rd_rt, 1); chk("we", ctrl.we, 0);
    instr = {6'h06, 5'd3, 5'd0, 16'd4}; #1; chk("br", ctrl.br, BR_LEZ);
    instr = {6'h07, 5'd3, 5'd0, 16'd4}; #1; chk("br", ctrl.br, BR_GTZ);
    // j / jal
    instr = {6'h02, 26'h40}; #1;
    chk("jump", {is_jump, is_transfer}, 2'b11); chk("we", ctrl.we, 0);
    instr = {6'h03, 26'h40}; #1;
    chk("jump", {is_jump, is_transfer}, 2'b11); chk("rd", ctrl.rd, 31); chk("res", ctrl.res_sel, RES_LINK);
    // jr $31 / jalr $5,$6
    instr = {6'h0, 5'd31, 5'd0, 5'd0, 5'd0, 6'h08}; #1;
    chk("br", ctrl.br, BR_REG); chk("we", ctrl.we, 0); chk("jump", {is_jump, is_transfer}, 2'b01);
    instr = {6'h0, 5'd6, 5'd0, 5'd5, 5'd0, 6'h09}; #1;
    chk("br", ctrl.br, BR_REG); chk("rd", ctrl.rd, 5); chk("res", ctrl.res_sel, RES_LINK);
    // mult / mfhi / mtlo
    instr = {6'h0, 5'd1, 5'd2, 5'd0, 5'd0, 6'h18}; #1;
    chk("md", ctrl.md_op, MD_MULT); chk("we", ctrl.we, 0);
    instr = {6'h0, 5'd0, 5'd0, 5'd9, 5'd0, 6'h10}; #1;
    chk("res", ctrl.res_sel, RES_HI); chk("flags", {rread.rd_rs, rread.rd_rt, rread.wr_rd}, 3'b001);
    instr = {6'h0, 5'd4, 5'd0, 5'd0, 5'd0, 6'h13}; #1;
    chk("md", ctrl.md_op, MD_MTLO); chk("flags", {rread.rd_rs, rread.rd_rt, rread.wr_rd}, 3'b100);
    // slti / sltiu
    instr = {6'h0a, 5'd1, 5'd2, 16'h8000}; #1; chk("alu", ctrl.alu_op, ALU_SLT); chk("imm", ctrl.imm, 32'hFFFF_8000);
    instr = {6'h0b, 5'd1, 5'd2, 16'h8000}; #1; chk("alu", ctrl.alu_op, ALU_SLTU);
    // unknown opcode: no effect
    instr = {6'h3f, 26'h123}; #1;
    chk("nop", {ctrl.we, ctrl.mem_rd, ctrl.mem_wr, rread.rd_rs, rread.rd_rt}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
