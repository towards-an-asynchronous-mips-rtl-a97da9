// tb_dhdt: self-checking test of the Data Hazard Detection Table.
// Part 1 replays the five-instruction example in which $2, written by SUB,
// is read by AND (one back: forward from EX), OR (two back: forward from MEM),
// ADD (three back: wait for write-back) and SW (after $2 is written back:
// register), and checks the table's classification and CurIndex at each step.
// It also checks that an older write-back cannot clean a register a younger
// instruction will still write, and the four-instruction limit.
// Part 2 applies random issue and write-back events and compares every
// classification with a table model kept in the testbench.
//
// The first part follows the worked five-instruction example of the published
// design; the random part is this test's own.
module tb_dhdt;
  logic clk = 0, rst_n = 0;
  logic [4:0] rs = 0, rt = 0, issue_rd = 0, wb_rd = 0;
  logic [1:0] cls_rs, cls_rt, cur_index, wb_idx = 0;
  logic issue = 0, issue_wr = 0, can_issue, wb_valid = 0, wb_we = 0;
  int checks = 0, failures = 0;

  dhdt dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic do_issue(input int s, input int t, input int d);
    rs = 5'(s); rt = 5'(t); issue = 1; issue_wr = 1; issue_rd = 5'(d);
    @(negedge clk); issue = 0; issue_wr = 0;
  endtask

  task automatic do_wb(input int r, input int idx);
    wb_valid = 1; wb_we = 1; wb_rd = 5'(r); wb_idx = 2'(idx);
    @(negedge clk); wb_valid = 0; wb_we = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // model for part 2
  logic       mclean [32];
  logic [1:0] mindex [32];
  logic [1:0] mcur;
  int         minfl;
  function automatic int mcls(input logic [4:0] r);
    logic [1:0] d;
    if (r == 0 || mclean[r] || (wb_valid && wb_we && wb_rd == r && wb_idx == mindex[r])) return 0;
    d = mcur - mindex[r];
    return (d == 1) ? 1 : (d == 2) ? 2 : 3;
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    // SUB $2,$1,$3
    rs = 1; rt = 3; #1; chk("SUB rs", cls_rs, 0); chk("SUB rt", cls_rt, 0); chk("cur", cur_index, 0);
    do_issue(1, 3, 2);
    // AND $3,$2,$4
    rs = 2; rt = 4; #1; chk("AND $2", cls_rs, 1); chk("AND $4", cls_rt, 0); chk("cur", cur_index, 1);
    do_issue(2, 4, 3);
    // OR $4,$1,$2
    rs = 1; rt = 2; #1; chk("OR $1", cls_rs, 0); chk("OR $2", cls_rt, 2); chk("cur", cur_index, 2);
    do_issue(1, 2, 4);
    // ADD $5,$1,$2: $2 is three back -> wait
    rs = 1; rt = 2; #1; chk("ADD $2", cls_rt, 3); chk("cur", cur_index, 3);
    chk("can_issue", can_issue, 1);
    // the RegWrite of $2 arrives: same-cycle it reads as clean
    wb_valid = 1; wb_we = 1; wb_rd = 2; wb_idx = 0; #1;
    chk("ADD $2 with write-back", cls_rt, 0);
    issue = 1; issue_wr = 1; issue_rd = 5; @(negedge clk); issue = 0; wb_valid = 0;
    // SW $5,100($2): $2 clean, $5 written by ADD one back
    rs = 2; rt = 5; #1; chk("SW $2", cls_rs, 0); chk("SW $5", cls_rt, 1); chk("cur", cur_index, 0);
    // three in flight (AND, OR, ADD): one more may enter, then the limit holds
    chk("can_issue 3", can_issue, 1);
    do_issue(0, 0, 0);
    chk("can_issue 4", can_issue, 0);
    // a write of $3 by an older index must not clean $3 now owned by index 1
    do_wb(3, 1);   // AND retires: cleans $3 (index 1 matches)
    rs = 3; #1; chk("$3 clean", cls_rs, 0);
    do_issue(0, 0, 3);            // $3 now owned by index 1 again (cur was 1)
    do_wb(4, 2);                  // OR retires
    do_wb(3, 1);                  // stale-looking write with matching index: cleans
    rs = 3; #1; chk("$3 cleaned by matching index", cls_rs, 0);
    do_issue(0, 0, 6);            // $6 owned by index 2
    do_wb(6, 3);                  // wrong index: must stay pending
    rs = 6; #1; checks++; if (cls_rs == 0) begin failures++; $display("$6 cleaned by a wrong index"); end

    // part 2: random against the model
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int i = 0; i < 32; i++) begin mclean[i] = 1; mindex[i] = 0; end
    mcur = 0; minfl = 0;
    for (int n = 0; n < 5000; n++) begin
      rs = $urandom_range(0, 7); rt = $urandom_range(0, 7);
      wb_valid = (minfl > 0) && $urandom_range(0, 1);
      wb_we = $urandom; wb_rd = $urandom_range(0, 7);
      wb_idx = $urandom_range(0, 1) ? mindex[wb_rd] : 2'($urandom);
      #1;
      chk("rand rs", cls_rs, mcls(rs)); chk("rand rt", cls_rt, mcls(rt));
      chk("rand cur", cur_index, mcur); chk("rand can", can_issue, minfl < 4);
      issue = can_issue && $urandom_range(0, 1); issue_wr = $urandom; issue_rd = $urandom_range(0, 7);
      // model update
      if (wb_valid && wb_we && wb_rd != 0 && wb_idx == mindex[wb_rd]) mclean[wb_rd] = 1;
      if (issue) begin
        if (issue_wr && issue_rd != 0) begin mclean[issue_rd] = 0; mindex[issue_rd] = mcur; end
        mcur++;
      end
      minfl = minfl + (issue ? 1 : 0) - (wb_valid ? 1 : 0);
      @(negedge clk);
    end
    issue = 0; wb_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
