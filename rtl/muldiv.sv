// muldiv: the multiplier/divider with its HI and LO result registers.
//
// On a clock edge with `en` high it performs `op`: signed or unsigned
// 32x32 multiply (HI:LO = 64-bit product), signed or unsigned divide
// (LO = quotient, HI = remainder), or a move into HI or LO from `a`.  The
// result registers are read combinationally.  Each operation completes in one
// step; the description gives no timing for this unit.  Division by zero,
// left undefined by the architecture, gives LO = all ones and HI = the
// dividend here.  Signed division truncates toward zero.
module muldiv
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  md_op_t      op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] hi,
  output logic [31:0] lo
);
  logic [63:0] prod_s, prod_u;
  logic [31:0] q_s, r_s, q_u, r_u;

  assign prod_s = $unsigned($signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}));
  assign prod_u = {32'h0, a} * {32'h0, b};
  assign q_u    = (b == '0) ? '1 : a / b;
  assign r_u    = (b == '0) ? a  : a % b;
  assign q_s    = (b == '0) ? '1 : $unsigned($signed(a) / $signed(b));
  assign r_s    = (b == '0) ? a  : $unsigned($signed(a) % $signed(b));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi <= '0;
      lo <= '0;
    end else if (en) begin
      unique case (op)
        MD_MULT:  {hi, lo} <= prod_s;
        MD_MULTU: {hi, lo} <= prod_u;
        MD_DIV:   begin lo <= q_s; hi <= r_s; end
        MD_DIVU:  begin lo <= q_u; hi <= r_u; end
        MD_MTHI:  hi <= a;
        MD_MTLO:  lo <= a;
        default:  ;
      endcase
    end
  end
endmodule
