// tb_reg_bank: self-checking test of the register bank with hazard detection.
// The testbench plays both the ID stage (RegRead requests for a random
// instruction stream over registers $0..$5) and the write-back stage
// (in-order RegWrites, each writer's value chosen at random when it is
// issued, retired after random delays and sometimes held back for a while).
// For every RegPort it checks, against the stream kept in the testbench:
// FW_EX only when the latest earlier writer of the register is the previous
// instruction, FW_MEM only when it is the one before that, and otherwise the
// register data equal to that writer's value (which proves reads wait for
// write-backs three or more instructions back).  It also checks that no more
// than four instructions are ever between register read and write-back, and
// that waits and the four-instruction limit both happened.
//
// Waiting for write-back and the four-instruction limit follow the published
// algorithm; the random traffic is this test's own.
module tb_reg_bank;
  import mips_pkg::*;
  localparam int N = 3000;
  logic clk = 0, rst_n = 0;
  logic rr_req = 0, rr_ack, rp_req, rp_ack = 0, rw_req = 0, rw_ack, wait_evt;
  regread_t rr_data = '0;
  regport_t rp0, rp1;
  regwrite_t rw_data = '0;
  int checks = 0, failures = 0;

  reg_bank dut (.*);
  always #5 clk = ~clk;

  // the stream
  regread_t    ins  [N];
  logic [31:0] val  [N];
  int issued = 0, retired = 0, n_wait = 0, n_limit = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (wait_evt) n_wait++;
    if (rr_req != rr_ack && rp_req == rp_ack && !dut.can_issue) n_limit++;
  end

  function automatic int last_writer(input int m, input logic [4:0] r);
    for (int w = m - 1; w >= 0; w--) if (ins[w].wr_rd && ins[w].rd == r) return w;
    return -1;
  endfunction

  task automatic check_port(input int m, input logic used, input logic [4:0] r, input regport_t p, input string nm);
    int w;
    logic [31:0] e;
    if (!used) return;
    w = (r == 0) ? -1 : last_writer(m, r);
    e = (w < 0) ? 32'h0 : val[w];
    checks++;
    case (p.fw)
      FW_EX:  if (w != m - 1) begin failures++; $display("instr %0d %s: FW_EX but writer %0d", m, nm, w); end
      FW_MEM: if (w != m - 2) begin failures++; $display("instr %0d %s: FW_MEM but writer %0d", m, nm, w); end
      FW_REG: if (p.data !== e) begin failures++; $display("instr %0d %s: %h expected %h (writer %0d)", m, nm, p.data, e, w); end
      default: begin failures++; $display("bad code"); end
    endcase
  endtask

  // ID side
  initial begin
    for (int i = 0; i < N; i++) begin
      ins[i].rd_rs = $urandom; ins[i].rd_rt = $urandom; ins[i].wr_rd = ($urandom_range(0, 3) != 0);
      ins[i].rs = $urandom_range(0, 5); ins[i].rt = $urandom_range(0, 5); ins[i].rd = $urandom_range(0, 5);
      val[i] = $urandom;
    end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int m = 0; m < N; m++) begin
      @(negedge clk);
      rr_data = ins[m]; rr_req = ~rr_req;
      while (rp_req == rp_ack) @(negedge clk);
      issued++;
      check_port(m, ins[m].rd_rs, ins[m].rs, rp0, "rs");
      check_port(m, ins[m].rd_rt, ins[m].rt, rp1, "rt");
      checks++;
      if (issued - retired > 4) begin failures++; $display("%0d instructions in flight", issued - retired); end
      rp_ack = ~rp_ack;
    end
  end

  // WB side
  initial begin
    int hold;
    repeat (2) @(negedge clk);
    while (retired < N) begin
      @(negedge clk);
      hold = ($urandom_range(0, 40) == 0) ? 12 : $urandom_range(0, 3);
      repeat (hold) @(negedge clk);
      if (retired < issued && rw_req == rw_ack) begin
        rw_data.we = ins[retired].wr_rd; rw_data.idx = 2'(retired);
        rw_data.rd = ins[retired].rd; rw_data.data = val[retired];
        rw_req = ~rw_req;
        retired++;
      end
    end
    repeat (5) @(negedge clk);
    $display("waits=%0d limit=%0d", n_wait, n_limit);
    checks++; if (n_wait == 0)  begin failures++; $display("no read ever waited"); end
    checks++; if (n_limit == 0) begin failures++; $display("four-instruction limit never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
