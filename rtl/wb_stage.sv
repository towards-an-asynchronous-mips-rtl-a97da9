// wb_stage: local control of the write-back stage.
//
// It takes one instruction at a time from MEM, selects the loaded data or the
// EXE result (the write-back multiplexer), and sends the RegWrite to the
// register bank: write enable, the instruction's index, the destination
// register and the value.  An instruction that writes nothing still sends a
// RegWrite with we=0, so the register bank can count it as retired.  The
// retire message and the index field are this design's additions.
// Interfaces (2-phase): mw_* from MEM, rw_* to the register bank.  An
// instruction leaves one clock after it is seen if RegWrite is free.
module wb_stage
  import mips_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      mw_req,
  output logic      mw_ack,
  input  mem_wb_t   mw_data,
  output logic      rw_req,
  input  logic      rw_ack,
  output regwrite_t rw_data
);
  logic fire;
  assign fire = (mw_req != mw_ack) && (rw_req == rw_ack);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mw_ack  <= 1'b0;
      rw_req  <= 1'b0;
      rw_data <= '0;
    end else if (fire) begin
      rw_data.we   <= mw_data.we;
      rw_data.idx  <= mw_data.idx;
      rw_data.rd   <= mw_data.rd;
      rw_data.data <= mw_data.is_load ? mw_data.mem_data : mw_data.alu_res;
      rw_req       <= ~rw_req;
      mw_ack       <= ~mw_ack;
    end
  end
endmodule
