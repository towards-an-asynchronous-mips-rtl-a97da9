// tb_imem: self-checking test of the instruction memory.
// Loads a pattern through the load port, then issues fetch requests with
// random addresses and colours while `stall` toggles randomly, acting as the
// fetch unit on both 2-phase channels.  Each answer must carry the stored
// word, the address and the colour of its request, and with stall low the
// answer must come exactly one clock after the request is made.
//
// The memory's interface is this design's own, and so are the checks.
module tb_imem;
  import mips_pkg::*;
  localparam int W = 256;
  logic clk = 0, rst_n = 0, stall = 0;
  logic load_we = 0;
  logic [31:0] load_addr = 0, load_data = 0;
  logic req_req = 0, req_ack, req_colour = 0, rsp_req, rsp_ack = 0;
  logic [31:0] req_addr = 0;
  fetched_t rsp_data;
  int checks = 0, failures = 0;

  imem #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] pat(input int i);
    return 32'h9E37_79B9 * (i + 1);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lat;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); load_we = 1; load_addr = i * 4; load_data = pat(i);
    end
    @(negedge clk); load_we = 0; rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      req_addr = $urandom_range(0, W - 1) * 4; req_colour = $urandom;
      stall = (n % 2) ? ($urandom_range(0, 2) == 0) : 0;
      req_req = ~req_req;
      lat = 0;
      while (rsp_req == rsp_ack) begin
        @(negedge clk); lat++;
        stall = (n % 2) ? ($urandom_range(0, 2) == 0) : 0;
      end
      checks++;
      if (rsp_data.instr !== pat(req_addr / 4) || rsp_data.pc !== req_addr || rsp_data.colour !== req_colour) begin
        failures++; $display("bad answer for %h", req_addr);
      end
      checks++;
      if (req_req != req_ack) begin failures++; $display("request not acknowledged"); end
      if (n % 2 == 0) begin
        checks++;
        if (lat != 1) begin failures++; $display("latency %0d, expected 1", lat); end
      end
      rsp_ack = ~rsp_ack;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
