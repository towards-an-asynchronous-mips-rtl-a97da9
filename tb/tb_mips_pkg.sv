// tb_mips_pkg: self-checking test of the shared package.
// Checks the widths of the channel payloads that the design description
// fixes (RegRead 18 bits, RegPort 34 bits) and of this design's wider
// RegWrite (40 bits), the MIPS-I values of a sample of opcodes and function
// codes, the forwarding-code values, and the 16-bit sign-extension helper on
// random and edge values against a model written here.  No clock is needed;
// the watchdog is a time limit.
module tb_mips_pkg;
  import mips_pkg::*;
  int checks = 0, failures = 0;

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  task automatic chk6(input string what, input logic [5:0] got, input logic [5:0] exp);
    chk(what, {26'h0, got}, {26'h0, exp});
  endtask

  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] v;
    logic [31:0] e;
    chk("RegRead width", $bits(regread_t), 18);
    chk("RegPort width", $bits(regport_t), 34);
    chk("RegWrite width", $bits(regwrite_t), 40);
    chk("colour+target", $bits(redirect_t), 33);
    chk6("fw codes", {FW_REG, FW_EX, FW_MEM}, 6'b00_01_10);
    chk6("OP_LW", OP_LW, 6'o43); chk6("OP_SW", OP_SW, 6'o53); chk6("OP_BEQ", OP_BEQ, 6'o04);
    chk6("OP_JAL", OP_JAL, 6'o03); chk6("OP_LUI", OP_LUI, 6'o17); chk6("OP_LBU", OP_LBU, 6'o44);
    chk6("FN_JR", FN_JR, 6'o10); chk6("FN_MULT", FN_MULT, 6'o30); chk6("FN_SLTU", FN_SLTU, 6'o53);
    chk6("FN_SRAV", FN_SRAV, 6'o07); chk6("FN_MFLO", FN_MFLO, 6'o22);
    chk("sext 0x8000", sext16(16'h8000), 32'hFFFF_8000);
    chk("sext 0x7fff", sext16(16'h7FFF), 32'h0000_7FFF);
    for (int i = 0; i < 1000; i++) begin
      v = 16'($urandom);
      e = {16'h0, v};
      if (v >= 16'h8000) e = e - 32'h1_0000;   // two's-complement value of v
      chk("sext random", sext16(v), e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
