// tb_dmem: self-checking test of the data memory.
// Random reads and writes with random byte enables and random stalls, against
// a word array kept in the testbench.  Every answer must be the word as it
// was before the access; with stall low the answer comes one clock after the
// request.  The load and peek ports are checked too.
//
// The memory's interface is this design's own, and so are the checks.
module tb_dmem;
  localparam int W = 64;
  logic clk = 0, rst_n = 0, stall = 0;
  logic load_we = 0;
  logic [31:0] load_addr = 0, load_data = 0, peek_addr = 0, peek_data;
  logic req_req = 0, req_ack, req_wr = 0, rsp_req, rsp_ack = 0;
  logic [31:0] req_addr = 0, req_wdata = 0, rsp_rdata;
  logic [3:0] req_be = 0;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  dmem #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lat, k;
    for (int i = 0; i < W; i++) begin
      model[i] = $urandom;
      @(negedge clk); load_we = 1; load_addr = i * 4; load_data = model[i];
    end
    @(negedge clk); load_we = 0; rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      k = $urandom_range(0, W - 1);
      req_addr = k * 4 + $urandom_range(0, 3);   // low bits are ignored
      req_wr = $urandom; req_be = $urandom; req_wdata = $urandom;
      stall = (n % 3 == 0) ? $urandom : 0;
      req_req = ~req_req;
      lat = 0;
      while (rsp_req == rsp_ack) begin
        @(negedge clk); lat++; stall = (n % 3 == 0) ? $urandom : 0;
      end
      checks++;
      if (rsp_rdata !== model[k]) begin failures++; $display("read %0d: %h expected %h", k, rsp_rdata, model[k]); end
      if (n % 3 != 0) begin
        checks++;
        if (lat != 1) begin failures++; $display("latency %0d", lat); end
      end
      if (req_wr) for (int b = 0; b < 4; b++) if (req_be[b]) model[k][8*b +: 8] = req_wdata[8*b +: 8];
      rsp_ack = ~rsp_ack;
      peek_addr = k * 4;
      #1;
      checks++;
      if (peek_data !== model[k]) begin failures++; $display("peek %0d: %h expected %h", k, peek_data, model[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
