// exe_stage: local control of the EXE stage.
//
// It takes one bundle at a time from ID: control, PC, shift amount, ID's
// colour and the two RegPorts.  Through the fw_unit it obtains both operands,
// waiting if a forwarded result has not arrived yet.  It then runs the ALU or
// the multiplier/divider, compares the operands for a conditional branch
// (the "=" comparator) and adds the offset to PC+4 for the branch target.
// JR and JALR are resolved here too, with the register as target.
// The stage keeps its own copy of the colour bit: it takes ID's colour from
// each bundle (so it learns of jumps ID has done) and, when a branch is taken,
// flips it and sends the target with the new colour to the PC unit.  Its
// acknowledge to ID carries the colour back (ie_ack_colour), which is how ID
// learns a branch was taken.  The result goes on to MEM with the
// instruction's index, which EXE counts itself, advancing it once per
// instruction just as CurIndex does in the register bank.
// Interfaces (2-phase): ie_* from ID, b_* branch redirect, em_* to MEM; mf_*
// is the write port through which MEM fills the forwarding buffer.
// A bundle completes in the clock after it is seen, if operands are ready,
// the MEM channel is free and, for a taken branch, the redirect channel is
// free.  Branch resolution in EXE and the colour exchange follow the design
// description; JR/JALR handling and the index counter are this design's.
module exe_stage
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ie_req,
  output logic        ie_ack,
  output logic        ie_ack_colour,
  input  id_ex_t      ie_data,
  output logic        b_req,
  input  logic        b_ack,
  output redirect_t   b_data,
  output logic        em_req,
  input  logic        em_ack,
  output ex_mem_t     em_data,
  input  logic        mf_we,
  input  logic [1:0]  mf_idx,
  input  logic [31:0] mf_data,
  output logic        colour,
  output logic        fwd_ex_evt,    // an operand came from the EX forward
  output logic        fwd_mem_evt,   // an operand came from the MEM forward
  output logic        fwd_wait_evt,  // waiting for a forwarded result
  output logic        taken_evt      // a branch or register jump was taken
);
  logic [1:0]  idx;
  logic [31:0] op_a, op_b, b_alu, alu_y, hi, lo, res, pc4, target;
  logic [4:0]  shamt;
  logic        ready, taken, pending, fire;
  ctrl_t       c;

  assign c = ie_data.ctrl;

  fw_unit u_fw (
    .clk, .rst_n, .cur_idx(idx), .p0(ie_data.p0), .p1(ie_data.p1),
    .op_a, .op_b, .ready,
    .ex_done(fire), .ex_idx(idx), .ex_valid(c.we && !c.mem_rd), .ex_data(res),
    .mem_we(mf_we), .mem_idx(mf_idx), .mem_data(mf_data));

  assign b_alu = c.b_imm ? c.imm : op_b;
  assign shamt = c.shamt_reg ? op_a[4:0] : ie_data.sa;

  alu u_alu (.a(op_a), .b(b_alu), .shamt, .op(c.alu_op), .y(alu_y));

  muldiv u_md (.clk, .rst_n, .en(fire), .op(c.md_op), .a(op_a), .b(op_b), .hi, .lo);

  assign pc4 = ie_data.pc + 32'd4;

  always_comb begin
    unique case (c.res_sel)
      RES_HI:   res = hi;
      RES_LO:   res = lo;
      RES_LINK: res = ie_data.pc + 32'd8;
      default:  res = alu_y;
    endcase
    unique case (c.br)
      BR_EQ:   taken = (op_a == op_b);
      BR_NE:   taken = (op_a != op_b);
      BR_LEZ:  taken = $signed(op_a) <= 0;
      BR_GTZ:  taken = $signed(op_a) > 0;
      BR_LTZ:  taken = $signed(op_a) < 0;
      BR_GEZ:  taken = $signed(op_a) >= 0;
      BR_REG:  taken = 1'b1;
      default: taken = 1'b0;
    endcase
    target = (c.br == BR_REG) ? op_a : pc4 + {c.imm[29:0], 2'b00};
  end

  assign pending = (ie_req != ie_ack);
  assign fire = pending && ready && (em_req == em_ack) && (!taken || (b_req == b_ack));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx           <= '0;
      colour        <= 1'b0;
      ie_ack        <= 1'b0;
      ie_ack_colour <= 1'b0;
      b_req         <= 1'b0;
      b_data        <= '0;
      em_req        <= 1'b0;
      em_data       <= '0;
    end else if (fire) begin
      em_data.idx     <= idx;
      em_data.res     <= res;
      em_data.sdata   <= op_b;
      em_data.mem_rd  <= c.mem_rd;
      em_data.mem_wr  <= c.mem_wr;
      em_data.msize   <= c.msize;
      em_data.mem_uns <= c.mem_uns;
      em_data.we      <= c.we;
      em_data.rd      <= c.rd;
      em_req          <= ~em_req;
      if (taken) begin
        b_data.target <= target;
        b_data.colour <= ~ie_data.colour;
        b_req         <= ~b_req;
        colour        <= ~ie_data.colour;
        ie_ack_colour <= ~ie_data.colour;
      end else begin
        colour        <= ie_data.colour;
        ie_ack_colour <= ie_data.colour;
      end
      ie_ack <= ~ie_ack;
      idx    <= idx + 2'd1;
    end
  end

  assign fwd_ex_evt   = fire && ((ie_data.p0.fw == FW_EX)  || (ie_data.p1.fw == FW_EX));
  assign fwd_mem_evt  = fire && ((ie_data.p0.fw == FW_MEM) || (ie_data.p1.fw == FW_MEM));
  assign fwd_wait_evt = pending && !ready;
  assign taken_evt    = fire && taken;
endmodule
