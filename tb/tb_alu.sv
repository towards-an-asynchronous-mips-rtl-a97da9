// tb_alu: self-checking test of the ALU and shifter.
// Random operands and shift amounts for every operation; expected values are
// computed here with independent expressions (64-bit arithmetic for the
// adders, explicit sign handling for compares and the arithmetic shift).
//
// The expected values come from MIPS-I semantics; the operand mix is this
// test's own.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, y, exp_y;
  logic [4:0]  shamt;
  alu_op_t     op;
  int checks = 0, failures = 0;

  alu dut (.*);

  function automatic logic [31:0] model(input alu_op_t o, input logic [31:0] x, input logic [31:0] z, input logic [4:0] s);
    logic [63:0] wide;
    logic [31:0] r;
    case (o)
      ALU_ADD:  begin wide = {32'h0, x} + {32'h0, z}; r = wide[31:0]; end
      ALU_SUB:  begin wide = {32'h0, x} + {32'h0, ~z} + 64'd1; r = wide[31:0]; end
      ALU_AND:  r = x & z;
      ALU_OR:   r = x | z;
      ALU_XOR:  r = x ^ z;
      ALU_NOR:  r = ~x & ~z;
      ALU_SLT:  r = (x[31] != z[31]) ? {31'h0, x[31]} : {31'h0, x < z};
      ALU_SLTU: r = {31'h0, x < z};
      ALU_SLL:  begin r = z; repeat (s) r = {r[30:0], 1'b0}; end
      ALU_SRL:  begin r = z; repeat (s) r = {1'b0, r[31:1]}; end
      ALU_SRA:  begin r = z; repeat (s) r = {r[31], r[31:1]}; end
      ALU_LUI:  r = z * 32'h10000;
      default:  r = 0;
    endcase
    return r;
  endfunction

  initial begin
    fork
      begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
    join_none
    for (int i = 0; i < 4000; i++) begin
      op = alu_op_t'(i % 12);
      a = (i % 7 == 0) ? 32'h8000_0000 : $urandom;
      b = (i % 5 == 0) ? 32'hFFFF_FFFF : $urandom;
      shamt = $urandom;
      #1;
      exp_y = model(op, a, b, shamt);
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("op %s a=%h b=%h s=%0d: y=%h expected %h", op.name(), a, b, shamt, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
