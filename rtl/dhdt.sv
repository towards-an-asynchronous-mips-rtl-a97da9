// dhdt: the Data Hazard Detection Table inside the register bank.
//
// For every register it keeps a Flag of three bits: Clean (no write to it is
// pending) and a 2-bit Index naming the instruction that will write it.  A
// 2-bit CurIndex counts the instructions entering the register bank modulo
// four.  With at most four instructions between ID and WB, the distance
// CurIndex - Index of a pending register says where its value will be:
//   1  the previous instruction: forward the EX result        (FW_EX)
//   2  the one before:            forward the MEM result        (FW_MEM)
//   3  older still:               wait for its RegWrite         (wait)
// The lookup is combinational for the two source registers; a RegWrite in the
// same cycle that cleans a register makes it read as clean, so the bank can
// pass the written value straight through.  On `issue` the destination's Flag
// becomes (Clean=0, Index=CurIndex) and CurIndex advances; on a RegWrite the
// Flag is cleaned only if the write carries the Index stored for that
// register, so an older write cannot clean a register a younger instruction
// will still write.  That index check, and the in-flight counter that holds
// the number of instructions between ID and WB at four, are this design's
// additions to the table described for the design.  Register 0 is always
// clean.  `issue` and a RegWrite may come in the same cycle.
module dhdt
  import mips_pkg::*;
#(
  parameter int unsigned NREGS = 32,
  parameter int unsigned IDX_W = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // lookup
  input  logic [4:0]  rs,
  input  logic [4:0]  rt,
  output logic [1:0]  cls_rs,     // 0 clean, 1 FW_EX, 2 FW_MEM, 3 wait
  output logic [1:0]  cls_rt,
  // new instruction entering the bank
  input  logic        issue,
  input  logic        issue_wr,
  input  logic [4:0]  issue_rd,
  output logic [IDX_W-1:0] cur_index,
  output logic        can_issue,
  // write-back / retire event
  input  logic        wb_valid,
  input  logic        wb_we,
  input  logic [4:0]  wb_rd,
  input  logic [IDX_W-1:0] wb_idx
);
  localparam int unsigned DEPTH = 1 << IDX_W;   // instructions ID..WB
  localparam int CW = $clog2(DEPTH + 1);

  logic [NREGS-1:0]  clean;
  logic [IDX_W-1:0]  index [NREGS];
  logic [CW-1:0]     inflight;

  function automatic logic cleaned_now(input logic [4:0] r);
    return wb_valid && wb_we && (wb_rd == r) && (wb_idx == index[r]);
  endfunction

  function automatic logic [1:0] classify(input logic [4:0] r);
    logic [IDX_W-1:0] d;
    d = cur_index - index[r];
    if (r == 5'd0 || clean[r] || cleaned_now(r)) return 2'd0;
    else if (d == IDX_W'(1))                     return 2'd1;
    else if (d == IDX_W'(2))                     return 2'd2;
    else                                         return 2'd3;
  endfunction

  assign cls_rs    = classify(rs);
  assign cls_rt    = classify(rt);
  assign can_issue = (inflight < CW'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clean     <= '1;
      cur_index <= '0;
      inflight  <= '0;
      for (int i = 0; i < NREGS; i++) index[i] <= '0;
    end else begin
      if (wb_valid && wb_we && wb_rd != 5'd0 && wb_idx == index[wb_rd])
        clean[wb_rd] <= 1'b1;
      if (issue) begin
        if (issue_wr && issue_rd != 5'd0) begin
          clean[issue_rd] <= 1'b0;
          index[issue_rd] <= cur_index;
        end
        cur_index <= cur_index + 1'b1;
      end
      inflight <= inflight + CW'(issue) - CW'(wb_valid);
    end
  end

  a_limit: assert property (@(posedge clk) disable iff (!rst_n) issue |-> can_issue);
  a_retire: assert property (@(posedge clk) disable iff (!rst_n) wb_valid |-> (inflight != '0));
endmodule
