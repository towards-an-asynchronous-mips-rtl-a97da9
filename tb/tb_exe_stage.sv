// tb_exe_stage: self-checking test of the EXE stage.
// Bundles are built from encoded instructions with the decoder and sent on
// the ID->EXE channel; the testbench acts as MEM (taking results, and
// writing final results back through the forwarding port when it chooses)
// and as the PC side (taking branch redirects).  Directed steps check: ALU
// results and the index EXE attaches; an operand forwarded from the previous
// instruction (EX) and from the one before (MEM); a load's dependant waiting
// until MEM supplies the loaded value and not acknowledging earlier;
// multiply followed by MFLO/MFHI; JAL's link value; a taken BEQ (target,
// flipped colour in the redirect and in the acknowledge), an untaken BNE, a
// JR; and a colour change arriving from ID with a bundle.  A random part
// then sends 2000 ALU, shift and immediate instructions, about half of them
// with the first operand forwarded from the previous result, and checks each
// result against a model in the testbench.
//
// The colour exchange checked here follows the published scheme; the cases
// and values are this test's own.
module tb_exe_stage;
  import mips_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ie_req = 0, ie_ack, ie_ack_colour, b_req, b_ack = 0, em_req, em_ack = 0;
  logic mf_we = 0, colour, fwd_ex_evt, fwd_mem_evt, fwd_wait_evt, taken_evt;
  logic [1:0] mf_idx = 0;
  logic [31:0] mf_data = 0;
  id_ex_t ie_data = '0;
  redirect_t b_data;
  ex_mem_t em_data;
  int checks = 0, failures = 0;

  exe_stage dut (.*);
  always #5 clk = ~clk;

  // decoder used to build the control bundles
  logic [31:0] dinstr = 0;
  ctrl_t dctrl; regread_t drr; logic dj, dt;
  decode_unit dec (.instr(dinstr), .ctrl(dctrl), .rread(drr), .is_jump(dj), .is_transfer(dt));

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  // send one instruction; returns cycles until acknowledged
  task automatic send(input logic [31:0] ins, input logic [31:0] pc, input logic col,
                      input fw_t f0, input logic [31:0] d0, input fw_t f1, input logic [31:0] d1,
                      output int cyc);
    @(negedge clk);
    dinstr = ins; #1;
    ie_data.ctrl = dctrl; ie_data.pc = pc; ie_data.sa = ins[10:6]; ie_data.colour = col;
    ie_data.p0 = '{data: d0, fw: f0}; ie_data.p1 = '{data: d1, fw: f1};
    ie_req = ~ie_req;
    cyc = 0;
    while (ie_req != ie_ack) begin @(negedge clk); cyc++; end
  endtask

  task automatic take_result(output ex_mem_t r);
    while (em_req == em_ack) @(negedge clk);
    r = em_data;
    em_ack = ~em_ack;
  endtask

  localparam fw_t RG = FW_REG, EX = FW_EX, ME = FW_MEM;

  initial begin
    ex_mem_t r;
    int cyc;
    logic [31:0] prev;
    repeat (2) @(negedge clk); rst_n = 1;
    // 0: addu $3,$1,$2 = 5 + 7
    send({6'h0, 5'd1, 5'd2, 5'd3, 5'd0, 6'h21}, 32'h100, 0, RG, 5, RG, 7, cyc);
    take_result(r); chk("addu", r.res, 12); chk("idx0", r.idx, 0); chk("we", r.we, 1); chk("rd", r.rd, 3);
    chk("ack colour", ie_ack_colour, 0);
    // 1: subu $4,$3,$1 with $3 from EX: 12 - 5
    send({6'h0, 5'd3, 5'd1, 5'd4, 5'd0, 6'h23}, 32'h104, 0, EX, 32'hDEAD, RG, 5, cyc);
    take_result(r); chk("EX forward", r.res, 7); chk("idx1", r.idx, 1);
    // 2: or $5,$1,$3 with $3 from MEM (two back = index 0)
    send({6'h0, 5'd1, 5'd3, 5'd5, 5'd0, 6'h25}, 32'h108, 0, RG, 32'h10, ME, 32'hDEAD, cyc);
    take_result(r); chk("MEM forward", r.res, 32'h1C);
    // 3: lw $6,8($1): address 13
    send({6'h23, 5'd1, 5'd6, 16'd8}, 32'h10C, 0, RG, 5, RG, 0, cyc);
    take_result(r); chk("load address", r.res, 13); chk("mem_rd", r.mem_rd, 1); chk("idx3", r.idx, 3);
    // 4: addu $7,$6,$6 with both from EX: must wait until MEM supplies the load
    fork
      begin
        repeat (6) @(negedge clk);
        chk("no ack before load data", (ie_req != ie_ack), 1);
        mf_we = 1; mf_idx = 3; mf_data = 32'h40;
        @(negedge clk); mf_we = 0;
      end
      send({6'h0, 5'd6, 5'd6, 5'd7, 5'd0, 6'h21}, 32'h110, 0, EX, 0, EX, 0, cyc);
    join
    take_result(r); chk("load-use", r.res, 32'h80); chk("waited", cyc >= 6, 1);
    // 5: mult $1,$2 (-3 * 5); 6: mflo; 7: mfhi
    send({6'h0, 5'd1, 5'd2, 5'd0, 5'd0, 6'h18}, 32'h114, 0, RG, -3, RG, 5, cyc);
    take_result(r); chk("mult writes nothing", r.we, 0);
    send({6'h0, 5'd0, 5'd0, 5'd8, 5'd0, 6'h12}, 32'h118, 0, RG, 0, RG, 0, cyc);
    take_result(r); chk("mflo", r.res, -15);
    send({6'h0, 5'd0, 5'd0, 5'd9, 5'd0, 6'h10}, 32'h11C, 0, RG, 0, RG, 0, cyc);
    take_result(r); chk("mfhi", r.res, 32'hFFFF_FFFF);
    // jal link value (jump done by ID; bundle only writes $31)
    send({6'h03, 26'h10}, 32'h120, 0, RG, 0, RG, 0, cyc);
    take_result(r); chk("jal link", r.res, 32'h128); chk("jal rd", r.rd, 31);
    chk("no redirect for jal", b_req == b_ack, 1);
    // taken beq: target = pc + 4 + 4*3
    send({6'h04, 5'd1, 5'd2, 16'd3}, 32'h200, 0, RG, 9, RG, 9, cyc);
    take_result(r);
    chk("redirect made", b_req != b_ack, 1); chk("target", b_data.target, 32'h210);
    chk("new colour", b_data.colour, 1); chk("ack colour", ie_ack_colour, 1); chk("stage colour", colour, 1);
    @(negedge clk); b_ack = ~b_ack;
    // untaken bne with the colour sent by ID
    send({6'h05, 5'd1, 5'd2, 16'hFFFF}, 32'h210, 1, RG, 9, RG, 9, cyc);
    take_result(r); chk("no redirect", b_req == b_ack, 1); chk("ack colour kept", ie_ack_colour, 1);
    // taken bne backwards
    send({6'h05, 5'd1, 5'd2, 16'hFFFE}, 32'h214, 1, RG, 1, RG, 2, cyc);
    take_result(r); chk("back target", b_data.target, 32'h210); chk("colour back to 0", b_data.colour, 0);
    @(negedge clk); b_ack = ~b_ack;
    // ID changed colour (jump): EXE adopts it
    send({6'h0, 5'd1, 5'd2, 5'd3, 5'd0, 6'h21}, 32'h300, 1, RG, 1, RG, 1, cyc);
    take_result(r); chk("adopt colour", colour, 1); chk("ack", ie_ack_colour, 1);
    // jr $31
    send({6'h0, 5'd31, 5'd0, 5'd0, 5'd0, 6'h08}, 32'h304, 1, RG, 32'h400, RG, 0, cyc);
    take_result(r); chk("jr target", b_data.target, 32'h400); chk("jr colour", b_data.colour, 0);
    @(negedge clk); b_ack = ~b_ack;
    // bltz / bgez / blez / bgtz on -1
    send({6'h01, 5'd1, 5'd0, 16'd1}, 32'h400, 0, RG, -1, RG, 0, cyc);
    take_result(r); chk("bltz taken", b_req != b_ack, 1); @(negedge clk); b_ack = ~b_ack;
    send({6'h01, 5'd1, 5'd1, 16'd1}, 32'h500, 1, RG, -1, RG, 0, cyc);
    take_result(r); chk("bgez not taken", b_req == b_ack, 1);
    send({6'h07, 5'd1, 5'd0, 16'd1}, 32'h504, 1, RG, -1, RG, 0, cyc);
    take_result(r); chk("bgtz not taken", b_req == b_ack, 1);
    send({6'h06, 5'd1, 5'd0, 16'd1}, 32'h508, 1, RG, -1, RG, 0, cyc);
    take_result(r); chk("blez taken", b_req != b_ack, 1); chk("blez target", b_data.target, 32'h510);
    @(negedge clk); b_ack = ~b_ack;
    // random ALU, shift and immediate instructions; the first operand is
    // taken from the previous result (FW_EX) about half the time, and MEM
    // takes results after random delays
    prev = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] ins, a, b, e;
      logic [5:0] fn;
      logic [4:0] sa;
      logic [15:0] im;
      logic use_fw;
      a = $urandom; b = $urandom; sa = 5'($urandom); im = 16'($urandom);
      if ($urandom_range(0, 3) == 0) b = a;
      use_fw = $urandom_range(0, 1);
      if (use_fw) a = prev;
      if ($urandom_range(0, 1)) begin
        case ($urandom_range(0, 15))
          0: fn = FN_ADDU; 1: fn = FN_SUBU; 2: fn = FN_AND; 3: fn = FN_OR; 4: fn = FN_XOR;
          5: fn = FN_NOR; 6: fn = FN_SLT; 7: fn = FN_SLTU; 8: fn = FN_SLL; 9: fn = FN_SRL;
          10: fn = FN_SRA; 11: fn = FN_SLLV; 12: fn = FN_SRLV; 13: fn = FN_SRAV; 14: fn = FN_ADD;
          default: fn = FN_SUB;
        endcase
        ins = {OP_RTYPE, 5'd1, 5'd2, 5'd3, sa, fn};
        case (fn)
          FN_ADDU, FN_ADD: e = a + b;
          FN_SUBU, FN_SUB: e = a - b;
          FN_AND:  e = a & b;
          FN_OR:   e = a | b;
          FN_XOR:  e = a ^ b;
          FN_NOR:  e = ~(a | b);
          FN_SLT:  e = {31'h0, $signed(a) < $signed(b)};
          FN_SLTU: e = {31'h0, a < b};
          FN_SLL:  e = b << sa;
          FN_SRL:  e = b >> sa;
          FN_SRA:  e = $signed(b) >>> sa;
          FN_SLLV: e = b << a[4:0];
          FN_SRLV: e = b >> a[4:0];
          default: e = $signed(b) >>> a[4:0];
        endcase
      end else begin
        case ($urandom_range(0, 7))
          0: begin ins = {OP_ADDIU, 5'd1, 5'd3, im}; e = a + sext16(im); end
          1: begin ins = {OP_ADDI,  5'd1, 5'd3, im}; e = a + sext16(im); end
          2: begin ins = {OP_SLTI,  5'd1, 5'd3, im}; e = {31'h0, $signed(a) < $signed(sext16(im))}; end
          3: begin ins = {OP_SLTIU, 5'd1, 5'd3, im}; e = {31'h0, a < sext16(im)}; end
          4: begin ins = {OP_ANDI,  5'd1, 5'd3, im}; e = a & {16'h0, im}; end
          5: begin ins = {OP_ORI,   5'd1, 5'd3, im}; e = a | {16'h0, im}; end
          6: begin ins = {OP_XORI,  5'd1, 5'd3, im}; e = a ^ {16'h0, im}; end
          default: begin ins = {OP_LUI, 5'd0, 5'd3, im}; e = {im, 16'h0}; end
        endcase
      end
      send(ins, 32'h1000 + 4 * n, 0, use_fw ? EX : RG, use_fw ? ~a : a, RG, b, cyc);
      repeat ($urandom_range(0, 2)) @(negedge clk);
      take_result(r);
      chk("random op", r.res, e);
      if (r.res !== e) $display("  instr %h a=%h b=%h fw=%0d", ins, a, b, use_fw);
      chk("random rd", r.rd, 3);
      prev = r.res;
    end
    chk("no redirect from ALU ops", b_req == b_ack, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
