// imem: instruction memory of the Harvard pair (instruction port only).
//
// A fetch request arrives on a 2-phase channel as an address plus the colour
// of the stream that issued it; the memory answers on a second 2-phase channel
// with the instruction word, the address and the same colour, so that the
// decode stage can tell stale prefetches from the current stream.  A request
// is served one clock after it is seen, provided the response channel is free
// and `stall` is low; `stall` lets an environment vary the access time, the
// way the delay of an asynchronous memory varies.  A separate synchronous load
// port fills the array before a program runs.  The memory size is this
// design's choice; addresses wrap modulo WORDS, so the
// byte-offset bits and the bits above the array size are not used.
module imem
  import mips_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stall,
  // load port
  input  logic        load_we,
  input  logic [31:0] load_addr,   // byte address
  input  logic [31:0] load_data,
  // request channel
  input  logic        req_req,
  output logic        req_ack,
  input  logic [31:0] req_addr,
  input  logic        req_colour,
  // response channel
  output logic        rsp_req,
  input  logic        rsp_ack,
  output fetched_t    rsp_data
);
  localparam int AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  logic serve;
  assign serve = (req_req != req_ack) && (rsp_req == rsp_ack) && !stall;

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[AW+1:2]] <= load_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_ack  <= 1'b0;
      rsp_req  <= 1'b0;
      rsp_data <= '0;
    end else if (serve) begin
      rsp_data.instr  <= mem[req_addr[AW+1:2]];
      rsp_data.pc     <= req_addr;
      rsp_data.colour <= req_colour;
      rsp_req         <= ~rsp_req;
      req_ack         <= ~req_ack;
    end
  end
endmodule
