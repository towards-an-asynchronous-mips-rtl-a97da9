// reg_bank: the register bank with built-in data hazard detection.
//
// It holds the 32 x 32-bit general registers and a dhdt.  A RegRead request
// (read-rs, read-rt, write-rd flags and the three register numbers) is served
// when the RegPort channel is free, fewer than four instructions are between
// ID and WB, and no source register is waiting for a write-back from three or
// more instructions back.  It then answers with RegPort0 (rs) and RegPort1
// (rt), each the register's data and a 2-bit forwarding code: FW_REG (data is
// valid), FW_EX or FW_MEM (EXE must take the result forwarded from the
// instruction one or two back).  A waiting read is completed in the cycle its
// RegWrite arrives, and the written value is passed straight to the port as
// it is written.  RegWrite requests (write enable, producer index, register,
// data) are taken every cycle, one clock after they appear.  Every retiring
// instruction sends one RegWrite, with we=0 if it writes nothing.
// Interfaces: rr_* (RegRead in), rp_* (RegPorts out), rw_* (RegWrite in), all
// 2-phase.  Register 0 reads as zero and is never written; reset clears
// all registers (a choice of this design).
module reg_bank
  import mips_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      rr_req,
  output logic      rr_ack,
  input  regread_t  rr_data,
  output logic      rp_req,
  input  logic      rp_ack,
  output regport_t  rp0,
  output regport_t  rp1,
  input  logic      rw_req,
  output logic      rw_ack,
  input  regwrite_t rw_data,
  output logic      wait_evt      // a read is held for a write-back this cycle
);
  logic [31:0] regs [NREGS];
  logic [1:0]  cls_rs, cls_rt;
  logic        can_issue, wb_fire, rd_pending, rd_fire, stall_wait;
  logic [31:0] rs_val, rt_val;

  assign wb_fire    = (rw_req != rw_ack);
  assign rd_pending = (rr_req != rr_ack) && (rp_req == rp_ack);
  assign stall_wait = (rr_data.rd_rs && cls_rs == 2'd3) || (rr_data.rd_rt && cls_rt == 2'd3);
  assign rd_fire    = rd_pending && can_issue && !stall_wait;
  assign wait_evt   = rd_pending && can_issue && stall_wait;

  dhdt #(.NREGS(NREGS), .IDX_W(2)) u_dhdt (
    .clk, .rst_n,
    .rs(rr_data.rs), .rt(rr_data.rt), .cls_rs, .cls_rt,
    .issue(rd_fire), .issue_wr(rr_data.wr_rd), .issue_rd(rr_data.rd),
    .cur_index(), .can_issue,
    .wb_valid(wb_fire), .wb_we(rw_data.we), .wb_rd(rw_data.rd), .wb_idx(rw_data.idx));

  // write-through read
  function automatic logic [31:0] rdval(input logic [4:0] r);
    if (r == 5'd0) return '0;
    if (wb_fire && rw_data.we && rw_data.rd == r) return rw_data.data;
    return regs[r];
  endfunction
  assign rs_val = rdval(rr_data.rs);
  assign rt_val = rdval(rr_data.rt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (wb_fire && rw_data.we && rw_data.rd != 5'd0) begin
      regs[rw_data.rd] <= rw_data.data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_ack <= 1'b0;
      rp_req <= 1'b0;
      rw_ack <= 1'b0;
      rp0    <= '0;
      rp1    <= '0;
    end else begin
      if (wb_fire) rw_ack <= ~rw_ack;
      if (rd_fire) begin
        rp0.data <= rs_val;
        rp0.fw   <= !rr_data.rd_rs ? FW_REG : fw_t'(cls_rs);
        rp1.data <= rt_val;
        rp1.fw   <= !rr_data.rd_rt ? FW_REG : fw_t'(cls_rt);
        rp_req   <= ~rp_req;
        rr_ack   <= ~rr_ack;
      end
    end
  end
endmodule
