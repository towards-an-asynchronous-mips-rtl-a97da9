// dmem: data memory of the Harvard pair.
//
// One 2-phase request channel carries a word address, a write flag, four byte
// enables and the write data; every request, read or write, is answered on a
// 2-phase response channel with the word stored at that address before the
// access.  A request is served one clock after it is seen if the response
// channel is free and `stall` is low.  The load port writes whole words before
// a run and the peek port reads a word combinationally for inspection.  Size
// and byte-enable interface are this design's choices; the description only
// places a data memory in the MEM stage.  Addresses wrap modulo WORDS, so
// the byte-offset bits and the bits above the array size are not used.
module dmem
  import mips_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stall,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  input  logic [31:0] peek_addr,
  output logic [31:0] peek_data,
  // request channel
  input  logic        req_req,
  output logic        req_ack,
  input  logic [31:0] req_addr,
  input  logic        req_wr,
  input  logic [3:0]  req_be,
  input  logic [31:0] req_wdata,
  // response channel
  output logic        rsp_req,
  input  logic        rsp_ack,
  output logic [31:0] rsp_rdata
);
  localparam int AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];
  logic [AW-1:0] wa;
  logic serve;

  assign wa    = req_addr[AW+1:2];
  assign serve = (req_req != req_ack) && (rsp_req == rsp_ack) && !stall;
  assign peek_data = mem[peek_addr[AW+1:2]];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[AW+1:2]] <= load_data;
    else if (serve && req_wr) begin
      for (int b = 0; b < 4; b++)
        if (req_be[b]) mem[wa][8*b +: 8] <= req_wdata[8*b +: 8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_ack   <= 1'b0;
      rsp_req   <= 1'b0;
      rsp_rdata <= '0;
    end else if (serve) begin
      rsp_rdata <= mem[wa];
      rsp_req   <= ~rsp_req;
      req_ack   <= ~req_ack;
    end
  end
endmodule
