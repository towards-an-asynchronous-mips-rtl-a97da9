// alu: the integer ALU and shifter of the EXE stage.
//
// Combinational.  Adds, subtracts, does the bitwise operations, signed and
// unsigned set-on-less-than, the three shifts and load-upper-immediate.
// Shifts move operand b by `shamt`; LUI places the low half of b in the
// upper half of the result.  Addition and subtraction wrap: overflow
// exceptions are not modelled.  The operation set is the MIPS-I integer set;
// the design description only names the ALU and the shifter.
module alu
  import mips_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  shamt,
  input  alu_op_t     op,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'b0, a < b};
      ALU_SLL:  y = b << shamt;
      ALU_SRL:  y = b >> shamt;
      ALU_SRA:  y = $unsigned($signed(b) >>> shamt);
      ALU_LUI:  y = {b[15:0], 16'h0};
      default:  y = '0;
    endcase
  end
endmodule
