// tb_fetch_unit: self-checking test of the autonomous prefetcher.
// The fetch unit runs against the instruction memory, whose words hold a
// function of their address, with random memory stalls, while the testbench
// takes instructions at random moments and now and then sends a redirect
// with a flipped colour to a random target.  It checks that the instructions
// of one colour come in sequence (PC up by 4, correct word), that after a
// redirect the first instruction of the new colour is the target, that the
// number of old-colour instructions still arriving after a redirect never
// exceeds the prefetch depth plus the output register, and that this number
// varied between redirects (prefetch depth is not fixed).
//
// Colour tagging follows the published scheme; the prefetch depth and the
// checks are this design's own.
module tb_fetch_unit;
  import mips_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0, stall = 0;
  logic rd_req = 0, rd_ack, ia_req, ia_ack, ia_colour, ir_req, ir_ack, if_req, if_ack = 0;
  redirect_t rd_data = '0;
  logic [31:0] ia_addr;
  fetched_t ir_data, if_data;
  int checks = 0, failures = 0;

  fetch_unit #(.PREFETCH_DEPTH(DEPTH)) dut (.*);
  imem #(.WORDS(256)) mem (.clk, .rst_n, .stall, .load_we(1'b0), .load_addr(32'h0), .load_data(32'h0),
    .req_req(ia_req), .req_ack(ia_ack), .req_addr(ia_addr), .req_colour(ia_colour),
    .rsp_req(ir_req), .rsp_ack(ir_ack), .rsp_data(ir_data));
  always #5 clk = ~clk;

  initial for (int i = 0; i < 256; i++) mem.mem[i] = 32'hA5A5_0000 ^ (i * 4);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic cur_col, expect_new;
    logic [31:0] next_pc, target;
    int stale, min_stale = 99, max_stale = 0, redirects = 0;
    cur_col = 0; next_pc = 0; expect_new = 0; stale = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      stall = ($urandom_range(0, 3) == 0);
      if (if_req != if_ack && $urandom_range(0, 2) != 0) begin
        checks++;
        if (if_data.instr !== (32'hA5A5_0000 ^ if_data.pc[31:0])) begin failures++; $display("wrong word at %h", if_data.pc); end
        if (if_data.colour == cur_col) begin
          checks++;
          if (expect_new) begin
            if (if_data.pc !== target) begin failures++; $display("first after redirect %h, expected %h", if_data.pc, target); end
            expect_new = 0;
            if (stale < min_stale) min_stale = stale;
            if (stale > max_stale) max_stale = stale;
            checks++;
            if (stale > DEPTH + 1) begin failures++; $display("%0d stale instructions", stale); end
          end else if (if_data.pc !== next_pc) begin
            failures++; $display("pc %h, expected %h", if_data.pc, next_pc);
          end
          next_pc = if_data.pc + 4;
        end else begin
          stale++;
          checks++;
          if (!expect_new) begin failures++; $display("old colour without redirect"); end
        end
        if_ack = ~if_ack;
      end
      if (!expect_new && rd_req == rd_ack && $urandom_range(0, 30) == 0) begin
        target = $urandom_range(0, 200) * 4;
        cur_col = ~cur_col;
        rd_data.target = target; rd_data.colour = cur_col;
        rd_req = ~rd_req;
        expect_new = 1; stale = 0; redirects++;
      end
    end
    $display("redirects=%0d stale min=%0d max=%0d", redirects, min_stale, max_stale);
    checks++; if (redirects < 10 || max_stale == min_stale) begin failures++; $display("prefetch depth never varied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
