// tb_mem_stage: self-checking test of the MEM stage with the data memory.
// Random word, half-word and byte loads and stores (signed and unsigned) and
// non-memory instructions are sent from an EXE model, with random memory
// stalls and a WB model that takes results after random delays.  A word
// model of the memory in the testbench gives the expected load values and
// final memory contents.  Each bundle handed to WB must carry the right
// index, register and data, and each register-writing instruction must also
// appear on the forwarding port with its final value, before or when it
// reaches WB.
//
// Forwarding MEM's final result follows the published forward buffer; load
// alignment is MIPS-I little-endian, a choice of this design.
module tb_mem_stage;
  import mips_pkg::*;
  localparam int W = 32;
  logic clk = 0, rst_n = 0, stall = 0;
  logic em_req = 0, em_ack, d_req, d_ack, d_wr, dr_req, dr_ack, mw_req, mw_ack = 0, mf_we;
  ex_mem_t em_data = '0;
  logic [31:0] d_addr, d_wdata, dr_rdata, mf_data, peek_data;
  logic [3:0] d_be;
  mem_wb_t mw_data;
  logic [1:0] mf_idx;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  mem_stage dut (.*);
  dmem #(.WORDS(W)) mem (.clk, .rst_n, .stall, .load_we(1'b0), .load_addr(32'h0), .load_data(32'h0),
    .peek_addr(32'h0), .peek_data,
    .req_req(d_req), .req_ack(d_ack), .req_addr(d_addr), .req_wr(d_wr), .req_be(d_be), .req_wdata(d_wdata),
    .rsp_req(dr_req), .rsp_ack(dr_ack), .rsp_rdata(dr_rdata));
  always #5 clk = ~clk;

  initial for (int i = 0; i < W; i++) begin model[i] = $urandom; mem.mem[i] = model[i]; end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) stall = ($urandom_range(0, 3) == 0);

  // expected results queue, filled by the sender
  typedef struct { logic [1:0] idx; logic [4:0] rd; logic we; logic [31:0] v; logic ld; } exp_t;
  exp_t q[$];
  logic [31:0] fwd_seen [4];
  logic        fwd_got  [4];
  always @(posedge clk) if (rst_n && mf_we) begin fwd_seen[mf_idx] <= mf_data; fwd_got[mf_idx] <= 1; end

  initial begin
    int k, bo;
    logic [31:0] w, v;
    exp_t e;
    for (int i = 0; i < 4; i++) fwd_got[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      while (em_req != em_ack) @(negedge clk);
      k = $urandom_range(0, W - 1);
      em_data = '0;
      em_data.idx = 2'(n); em_data.rd = $urandom_range(1, 31); em_data.sdata = $urandom;
      em_data.msize = msize_t'($urandom_range(0, 2)); em_data.mem_uns = $urandom;
      bo = (em_data.msize == MS_WORD) ? 0 : (em_data.msize == MS_HALF) ? 2 * $urandom_range(0, 1) : $urandom_range(0, 3);
      em_data.res = k * 4 + bo;
      case ($urandom_range(0, 2))
        0: begin em_data.mem_rd = 1; em_data.we = 1; end
        1: begin em_data.mem_wr = 1; em_data.we = 0; end
        default: begin em_data.we = $urandom; em_data.res = $urandom; end
      endcase
      w = model[k];
      v = em_data.res;
      if (em_data.mem_rd) begin
        w = w >> (8 * bo);
        case (em_data.msize)
          MS_WORD: v = model[k];
          MS_HALF: v = em_data.mem_uns ? {16'h0, w[15:0]} : {{16{w[15]}}, w[15:0]};
          default: v = em_data.mem_uns ? {24'h0, w[7:0]} : {{24{w[7]}}, w[7:0]};
        endcase
      end
      if (em_data.mem_wr) begin
        case (em_data.msize)
          MS_WORD: model[k] = em_data.sdata;
          MS_HALF: model[k][8*bo +: 16] = em_data.sdata[15:0];
          default: model[k][8*bo +: 8] = em_data.sdata[7:0];
        endcase
      end
      q.push_back('{idx: em_data.idx, rd: em_data.rd, we: em_data.we, v: v, ld: em_data.mem_rd});
      fwd_got[em_data.idx] = 0;
      em_req = ~em_req;
    end
  end

  initial begin
    exp_t e;
    int got;
    got = 0;
    repeat (2) @(negedge clk);
    while (got < 3000) begin
      @(negedge clk);
      if (mw_req != mw_ack && $urandom_range(0, 2) != 0) begin
        e = q.pop_front();
        checks++;
        if (mw_data.idx !== e.idx || mw_data.rd !== e.rd || mw_data.we !== e.we || mw_data.is_load !== e.ld ||
            (e.ld ? mw_data.mem_data : mw_data.alu_res) !== e.v) begin
          failures++; $display("result %0d wrong: %h expected %h", got, e.ld ? mw_data.mem_data : mw_data.alu_res, e.v);
        end
        if (e.we) begin
          @(posedge clk); #1;
          checks++;
          if (!fwd_got[e.idx] || fwd_seen[e.idx] !== e.v) begin failures++; $display("forward of %0d missing or wrong", got); end
          @(negedge clk);
        end
        mw_ack = ~mw_ack; got++;
      end
    end
    repeat (10) @(negedge clk);
    for (int i = 0; i < W; i++) begin
      checks++;
      if (mem.mem[i] !== model[i]) begin failures++; $display("mem[%0d] %h expected %h", i, mem.mem[i], model[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
