// fetch_unit: the autonomous instruction prefetcher (IF stage).
//
// It holds the PC, the +4 incrementer, the PC multiplexer that takes a new
// target from a redirect, and the processor's "colour" bit as the fetch side
// sees it.  Every address sent to the instruction memory carries the current
// colour, and the memory returns it with the instruction, so instructions
// fetched after a redirect can be told from those prefetched before it.  The
// unit runs on its own: it keeps up to PREFETCH_DEPTH instructions (buffered
// plus requested) ahead of the decode stage, so how many stale instructions
// are in flight when a jump or branch redirects it depends on timing, as in the
// asynchronous original.
//
// Interfaces (all 2-phase req/ack channels):
//   rd_*  redirect in: new target and new colour (from the arbiter)
//   ia_*  address out to instruction memory, ir_* its answer back
//   if_*  fetched instruction (instr, pc, colour) out to ID
// A redirect is taken the clock after it is seen and replaces the PC and the
// colour; a request still outstanding completes with its old colour.
// One memory request is outstanding at a time; the buffer depth and this
// single-request policy are this design's choices.
module fetch_unit
  import mips_pkg::*;
#(
  parameter int unsigned PREFETCH_DEPTH = 4,
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rd_req,
  output logic        rd_ack,
  input  redirect_t   rd_data,
  output logic        ia_req,
  input  logic        ia_ack,
  output logic [31:0] ia_addr,
  output logic        ia_colour,
  input  logic        ir_req,
  output logic        ir_ack,
  input  fetched_t    ir_data,
  output logic        if_req,
  input  logic        if_ack,
  output fetched_t    if_data
);
  localparam int CW = $clog2(PREFETCH_DEPTH + 1);
  localparam int PW = (PREFETCH_DEPTH > 1) ? $clog2(PREFETCH_DEPTH) : 1;

  logic [31:0] pc;
  logic        colour;
  logic        outstanding;
  fetched_t    buf_q [PREFETCH_DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] count;

  logic take_redirect, issue, push, pop;
  assign take_redirect = (rd_req != rd_ack);
  assign issue = !take_redirect && (ia_req == ia_ack) && !outstanding &&
                 (CW'(count) < CW'(PREFETCH_DEPTH));
  assign push  = (ir_req != ir_ack);
  assign pop   = (count != '0) && (if_req == if_ack);

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(PREFETCH_DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc          <= RESET_PC;
      colour      <= 1'b0;
      outstanding <= 1'b0;
      rd_ack      <= 1'b0;
      ia_req      <= 1'b0;
      ia_addr     <= '0;
      ia_colour   <= 1'b0;
      ir_ack      <= 1'b0;
      if_req      <= 1'b0;
      if_data     <= '0;
      rd_ptr      <= '0;
      wr_ptr      <= '0;
      count       <= '0;
    end else begin
      if (take_redirect) begin
        pc     <= rd_data.target;
        colour <= rd_data.colour;
        rd_ack <= ~rd_ack;
      end else if (issue) begin
        ia_addr     <= pc;
        ia_colour   <= colour;
        ia_req      <= ~ia_req;
        pc          <= pc + 32'd4;
      end
      if (issue) outstanding <= 1'b1;
      else if (push) outstanding <= 1'b0;
      if (push) begin
        buf_q[wr_ptr] <= ir_data;
        wr_ptr <= inc(wr_ptr);
        ir_ack <= ~ir_ack;
      end
      if (pop) begin
        if_data <= buf_q[rd_ptr];
        if_req  <= ~if_req;
        rd_ptr  <= inc(rd_ptr);
      end
      count <= count + CW'(push) - CW'(pop);
    end
  end

  // The buffer never overflows: a slot is reserved when a request is issued.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (count < CW'(PREFETCH_DEPTH)) || pop);
endmodule
