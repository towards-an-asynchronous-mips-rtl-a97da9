// async_mips: a five-stage MIPS pipeline built as asynchronous stages.
//
// The stages IF, ID, EXE, MEM and WB each run under their own local control
// and talk only through 2-phase bundled-data channels (a req toggle, an ack
// toggle and data that stays still in between), so a stage proceeds as soon
// as its inputs are there.  Here each channel end is a register clocked by
// `clk`, which makes the model synthesizable and simulatable while keeping
// the handshake structure of the asynchronous design.
//
//   fetch_unit -> imem -> fetch_unit -> id_stage -> exe_stage -> mem_stage -> wb_stage
//                                        |  ^ reg_bank (dhdt) <--- RegWrite ----'
//   redirect_arbiter <- jumps (ID), branches (EXE) -> fetch_unit
//
// Data hazards are resolved without a central forwarding unit: the register
// bank's hazard table tags each operand with where its value will come from,
// and EXE's forwarding unit waits for it.  Control hazards are resolved with a
// colour bit: the fetch unit tags every instruction with the colour of its
// stream, ID and EXE swap colour information on request and acknowledge, and
// ID drops instructions of the old colour after a jump or taken branch, apart
// from the delay slot.
//
// Ports: clock and active-low asynchronous reset; load ports for the two
// memories (byte addresses, whole words) used before releasing reset or
// while the core is idle; a peek port into data memory; stall inputs that
// slow the memories down, so that timing can be varied from outside.
// Status outputs show the colour held by ID and by EXE and pulse for one
// cycle on each pipeline event: an operand taken from EXE's or MEM's result,
// EXE waiting for a forwarded value, the register bank holding a read back
// for a write-back, ID discarding a wrong-colour instruction, ID executing a
// jump, and EXE taking a branch or register jump.
//
// The stage split, the register bank with its hazard table, the forward
// buffer and the colour exchange between ID and EXE follow the published
// design; the clocked channel model, the memories' load, peek and stall ports
// and the status outputs are this design's own.
module async_mips
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS     = 1024,
  parameter int unsigned DMEM_WORDS     = 1024,
  parameter int unsigned PREFETCH_DEPTH = 4,
  parameter logic [31:0] RESET_PC       = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        im_stall,
  input  logic        dm_stall,
  input  logic        im_load_we,
  input  logic [31:0] im_load_addr,
  input  logic [31:0] im_load_data,
  input  logic        dm_load_we,
  input  logic [31:0] dm_load_addr,
  input  logic [31:0] dm_load_data,
  input  logic [31:0] dm_peek_addr,
  output logic [31:0] dm_peek_data,
  output logic        id_colour,
  output logic        ex_colour,
  output logic        fwd_ex_evt,
  output logic        fwd_mem_evt,
  output logic        fwd_wait_evt,
  output logic        rb_wait_evt,
  output logic        discard_evt,
  output logic        jump_evt,
  output logic        taken_evt
);
  // redirect channels
  logic rdo_req, rdo_ack, j_req, j_ack, b_req, b_ack;
  redirect_t rdo_data, j_data, b_data;
  // instruction memory channels
  logic ia_req, ia_ack, ia_colour, ir_req, ir_ack;
  logic [31:0] ia_addr;
  fetched_t ir_data;
  // IF -> ID
  logic if_req, if_ack;
  fetched_t if_data;
  // ID <-> register bank
  logic rr_req, rr_ack, rp_req, rp_ack;
  regread_t rr_data;
  regport_t rp0, rp1;
  // ID -> EXE
  logic ie_req, ie_ack, ie_ack_colour;
  id_ex_t ie_data;
  // EXE -> MEM
  logic em_req, em_ack;
  ex_mem_t em_data;
  // MEM <-> data memory
  logic d_req, d_ack, d_wr, dr_req, dr_ack;
  logic [31:0] d_addr, d_wdata, dr_rdata;
  logic [3:0] d_be;
  // MEM -> WB, MEM -> forwarding buffer, WB -> register bank
  logic mw_req, mw_ack, mf_we, rw_req, rw_ack;
  mem_wb_t mw_data;
  logic [1:0] mf_idx;
  logic [31:0] mf_data;
  regwrite_t rw_data;

  fetch_unit #(.PREFETCH_DEPTH(PREFETCH_DEPTH), .RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst_n,
    .rd_req(rdo_req), .rd_ack(rdo_ack), .rd_data(rdo_data),
    .ia_req, .ia_ack, .ia_addr, .ia_colour,
    .ir_req, .ir_ack, .ir_data,
    .if_req, .if_ack, .if_data);

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .rst_n, .stall(im_stall),
    .load_we(im_load_we), .load_addr(im_load_addr), .load_data(im_load_data),
    .req_req(ia_req), .req_ack(ia_ack), .req_addr(ia_addr), .req_colour(ia_colour),
    .rsp_req(ir_req), .rsp_ack(ir_ack), .rsp_data(ir_data));

  redirect_arbiter u_arb (
    .clk, .rst_n,
    .j_req, .j_ack, .j_data, .b_req, .b_ack, .b_data,
    .o_req(rdo_req), .o_ack(rdo_ack), .o_data(rdo_data));

  id_stage u_id (
    .clk, .rst_n,
    .if_req, .if_ack, .if_data,
    .j_req, .j_ack, .j_data,
    .rr_req, .rr_ack, .rr_data,
    .rp_req, .rp_ack, .rp0, .rp1,
    .ie_req, .ie_ack, .ie_ack_colour, .ie_data,
    .colour(id_colour), .discard_evt, .jump_evt);

  reg_bank u_rb (
    .clk, .rst_n,
    .rr_req, .rr_ack, .rr_data,
    .rp_req, .rp_ack, .rp0, .rp1,
    .rw_req, .rw_ack, .rw_data,
    .wait_evt(rb_wait_evt));

  exe_stage u_ex (
    .clk, .rst_n,
    .ie_req, .ie_ack, .ie_ack_colour, .ie_data,
    .b_req, .b_ack, .b_data,
    .em_req, .em_ack, .em_data,
    .mf_we, .mf_idx, .mf_data,
    .colour(ex_colour), .fwd_ex_evt, .fwd_mem_evt, .fwd_wait_evt, .taken_evt);

  mem_stage u_mem (
    .clk, .rst_n,
    .em_req, .em_ack, .em_data,
    .d_req, .d_ack, .d_addr, .d_wr, .d_be, .d_wdata,
    .dr_req, .dr_ack, .dr_rdata,
    .mw_req, .mw_ack, .mw_data,
    .mf_we, .mf_idx, .mf_data);

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .rst_n, .stall(dm_stall),
    .load_we(dm_load_we), .load_addr(dm_load_addr), .load_data(dm_load_data),
    .peek_addr(dm_peek_addr), .peek_data(dm_peek_data),
    .req_req(d_req), .req_ack(d_ack), .req_addr(d_addr), .req_wr(d_wr),
    .req_be(d_be), .req_wdata(d_wdata),
    .rsp_req(dr_req), .rsp_ack(dr_ack), .rsp_rdata(dr_rdata));

  wb_stage u_wb (
    .clk, .rst_n,
    .mw_req, .mw_ack, .mw_data,
    .rw_req, .rw_ack, .rw_data);
endmodule
