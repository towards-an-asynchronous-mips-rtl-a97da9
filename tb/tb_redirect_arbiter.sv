// tb_redirect_arbiter: self-checking test of the redirect arbiter.
// Two senders (jumps from ID, branches from EXE) make requests at random,
// each waiting for its acknowledge before the next; the fetch side takes the
// output after random delays.  Each output must be a pending request, every
// request must come out exactly once, a sender's acknowledge must come only
// after its redirect was taken, and when both are pending the branch must win.
//
// The arbiter is named in the published design; its priority rule, checked
// here, is this design's own.
module tb_redirect_arbiter;
  import mips_pkg::*;
  logic clk = 0, rst_n = 0;
  logic j_req = 0, j_ack, b_req = 0, b_ack, o_req, o_ack = 0;
  redirect_t j_data = '0, b_data = '0, o_data;
  int checks = 0, failures = 0, nj = 0, nb = 0, outs = 0, both = 0;
  logic j_taken = 0, b_taken = 0, both_prev = 0;

  redirect_arbiter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if (both_prev) begin
        checks++;
        if (!(o_req != o_ack && o_data == b_data)) begin failures++; $display("branch did not win"); end
      end
      // new requests
      if (j_req == j_ack && $urandom_range(0, 5) == 0) begin
        j_data = {$urandom, 1'b0}; j_req = ~j_req; nj++; j_taken = 0;
      end
      if (b_req == b_ack && $urandom_range(0, 5) == 0) begin
        b_data = {$urandom, 1'b1}; b_req = ~b_req; nb++; b_taken = 0;
      end
      // output side
      if (o_req != o_ack && $urandom_range(0, 2) == 0) begin
        checks++;
        if (o_data == j_data && j_req != j_ack && !j_taken) j_taken = 1;
        else if (o_data == b_data && b_req != b_ack && !b_taken) b_taken = 1;
        else begin failures++; $display("output %h matches no pending request", o_data); end
        o_ack = ~o_ack; outs++;
      end
      both_prev = (dut.st == 2'd0) && (j_req != j_ack) && (b_req != b_ack);
      if (both_prev) both++;
    end
    // drain
    repeat (20) begin
      @(negedge clk);
      if (o_req != o_ack) begin
        if (o_data == j_data) j_taken = 1; else b_taken = 1;
        o_ack = ~o_ack; outs++;
      end
    end
    checks++;
    if (outs != nj + nb) begin failures++; $display("%0d outputs for %0d requests", outs, nj + nb); end
    checks++;
    if (j_req != j_ack || b_req != b_ack) begin failures++; $display("a request was never acknowledged"); end
    $display("jumps=%0d branches=%0d both_pending=%0d", nj, nb, both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // acknowledge only after being taken
  always @(j_ack) if (rst_n) begin checks++; if (!j_taken) begin failures++; $display("jump acknowledged before taken"); end end
  always @(b_ack) if (rst_n) begin checks++; if (!b_taken) begin failures++; $display("branch acknowledged before taken"); end end
endmodule
