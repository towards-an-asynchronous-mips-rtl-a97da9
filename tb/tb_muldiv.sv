// tb_muldiv: self-checking test of the multiplier/divider.
// Random operands (including zero divisors and negative values); expected
// HI/LO are computed with 64-bit integer arithmetic in the testbench.
// Each operation must be visible in HI/LO one clock after it is issued.
//
// Expected values follow MIPS-I; the divide-by-zero result is this design's
// own choice.
module tb_muldiv;
  import mips_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  md_op_t op = MD_NONE;
  logic [31:0] a = 0, b = 0, hi, lo;
  logic [31:0] eh, el;
  longint sa, sb;
  int checks = 0, failures = 0;

  muldiv dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      op = md_op_t'(1 + (i % 6));
      a = $urandom; b = (i % 11 == 0) ? 0 : ((i % 3 == 0) ? $urandom_range(0, 100) - 50 : $urandom);
      en = 1;
      eh = hi; el = lo;
      sa = longint'($signed(a)); sb = longint'($signed(b));
      case (op)
        MD_MULT:  {eh, el} = 64'(sa * sb);
        MD_MULTU: {eh, el} = 64'({32'h0, a}) * 64'({32'h0, b});
        MD_DIV:   if (b == 0) begin el = '1; eh = a; end
                  else begin el = 32'(sa / sb); eh = 32'(sa % sb); end
        MD_DIVU:  if (b == 0) begin el = '1; eh = a; end
                  else begin el = 32'(64'(a) / 64'(b)); eh = 32'(64'(a) % 64'(b)); end
        MD_MTHI:  eh = a;
        MD_MTLO:  el = a;
        default: ;
      endcase
      @(negedge clk);
      en = 0;
      checks++;
      if (hi !== eh || lo !== el) begin
        failures++;
        if (failures < 10) $display("%s a=%h b=%h: hi=%h lo=%h expected %h %h", op.name(), a, b, hi, lo, eh, el);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
