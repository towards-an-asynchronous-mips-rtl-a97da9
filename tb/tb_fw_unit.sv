// tb_fw_unit: self-checking test of the forwarding buffer and operand muxes.
// A model of the four-entry buffer (valid + data per index) is kept in the
// testbench; EXE-side and MEM-side writes with random indices, values and
// validity are applied, and random operand controls (register, one back, two
// back) are checked against the model: operand values, and `ready` low
// exactly when a selected entry is empty.
//
// The EX/MEM forwarding codes follow the published hazard algorithm; the
// buffer checks are this design's own.
module tb_fw_unit;
  import mips_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] cur_idx = 0, ex_idx = 0, mem_idx = 0;
  regport_t p0 = '0, p1 = '0;
  logic [31:0] op_a, op_b, ex_data = 0, mem_data = 0;
  logic ready, ex_done = 0, ex_valid = 0, mem_we = 0;
  logic mv [4];
  logic [31:0] md [4];
  int checks = 0, failures = 0;

  fw_unit dut (.*);
  always #5 clk = ~clk;

  function automatic logic [1:0] srcidx(input fw_t f);
    return (f == FW_EX) ? cur_idx - 1 : cur_idx - 2;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] ea, eb;
    logic er;
    for (int i = 0; i < 4; i++) begin mv[i] = 0; md[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check the combinational side first
      cur_idx = $urandom;
      p0.data = $urandom; p0.fw = fw_t'($urandom_range(0, 2));
      p1.data = $urandom; p1.fw = fw_t'($urandom_range(0, 2));
      #1;
      ea = (p0.fw == FW_REG) ? p0.data : md[srcidx(p0.fw)];
      eb = (p1.fw == FW_REG) ? p1.data : md[srcidx(p1.fw)];
      er = ((p0.fw == FW_REG) || mv[srcidx(p0.fw)]) && ((p1.fw == FW_REG) || mv[srcidx(p1.fw)]);
      checks++;
      if (ready !== er) begin failures++; $display("ready %b expected %b", ready, er); end
      if (er) begin
        checks++;
        if (op_a !== ea || op_b !== eb) begin failures++; $display("operands wrong"); end
      end
      // then writes for the next edge
      ex_done = $urandom; ex_idx = $urandom; ex_valid = $urandom; ex_data = $urandom;
      mem_we = $urandom; mem_idx = $urandom; mem_data = $urandom;
      if (ex_done && mem_we && ex_idx == mem_idx) mem_we = 0;
      if (ex_done) begin mv[ex_idx] = ex_valid; md[ex_idx] = ex_data; end
      if (mem_we)  begin mv[mem_idx] = 1; md[mem_idx] = mem_data; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
