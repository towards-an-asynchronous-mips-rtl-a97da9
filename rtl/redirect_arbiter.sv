// redirect_arbiter: merges the two sources of control transfer.
//
// Jumps are executed in ID and taken branches (and register jumps) in EXE;
// both send a new target address with a new colour, and both must reach the
// single PC unit.  This arbiter accepts a pending request from either 2-phase
// input channel, forwards it on its output channel, and acknowledges the input
// only after the fetch unit has acknowledged the output, so a sender knows
// the fetch side has switched streams when its ack arrives.  When both inputs
// are pending, EXE wins, since its branch belongs to the older instruction;
// that priority is this design's choice.  Latency: forward one clock after
// the request is seen, input ack one clock after the output ack is seen.
module redirect_arbiter
  import mips_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      j_req,
  output logic      j_ack,
  input  redirect_t j_data,
  input  logic      b_req,
  output logic      b_ack,
  input  redirect_t b_data,
  output logic      o_req,
  input  logic      o_ack,
  output redirect_t o_data
);
  typedef enum logic [1:0] { A_IDLE, A_J, A_B } arb_state_t;
  arb_state_t st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= A_IDLE;
      j_ack  <= 1'b0;
      b_ack  <= 1'b0;
      o_req  <= 1'b0;
      o_data <= '0;
    end else begin
      unique case (st)
        A_IDLE:
          if (b_req != b_ack) begin
            o_data <= b_data; o_req <= ~o_req; st <= A_B;
          end else if (j_req != j_ack) begin
            o_data <= j_data; o_req <= ~o_req; st <= A_J;
          end
        A_J: if (o_req == o_ack) begin j_ack <= ~j_ack; st <= A_IDLE; end
        A_B: if (o_req == o_ack) begin b_ack <= ~b_ack; st <= A_IDLE; end
        default: st <= A_IDLE;
      endcase
    end
  end

  // Bundled data: the output must not change while it is pending.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (o_req != o_ack) |-> (st != A_IDLE));
endmodule
