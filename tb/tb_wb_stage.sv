// tb_wb_stage: self-checking test of the write-back stage.
// Random MEM->WB bundles are sent while the register bank side acknowledges
// after random delays.  Each RegWrite must carry the bundle's write enable,
// index and register and the loaded data for a load, the EXE result
// otherwise, in order, one per bundle.
//
// The RegWrite fields beyond register and data (write enable, index) are this
// design's additions.
module tb_wb_stage;
  import mips_pkg::*;
  logic clk = 0, rst_n = 0;
  logic mw_req = 0, mw_ack, rw_req, rw_ack = 0;
  mem_wb_t mw_data = '0;
  regwrite_t rw_data;
  mem_wb_t q[$];
  int checks = 0, failures = 0, sent = 0, got = 0;

  wb_stage dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // producer
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    while (sent < 1000) begin
      @(negedge clk);
      if (mw_req == mw_ack && $urandom_range(0, 2) != 0) begin
        mw_data = {$urandom, $urandom, $urandom};
        q.push_back(mw_data);
        mw_req = ~mw_req; sent++;
      end
    end
  end
  // consumer
  initial begin
    mem_wb_t e;
    repeat (2) @(negedge clk);
    while (got < 1000) begin
      @(negedge clk);
      if (rw_req != rw_ack && $urandom_range(0, 2) != 0) begin
        e = q.pop_front();
        checks++;
        if (rw_data.we !== e.we || rw_data.idx !== e.idx || rw_data.rd !== e.rd ||
            rw_data.data !== (e.is_load ? e.mem_data : e.alu_res)) begin
          failures++; $display("RegWrite %0d wrong", got);
        end
        rw_ack = ~rw_ack; got++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
