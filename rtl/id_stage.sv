// id_stage: local control of the decode / register-read stage.
//
// The stage has two halves that run concurrently.
// The front half takes fetched instructions one at a time and
//  * discards an instruction whose colour differs from the stage's colour:
//    it was prefetched before the last jump or taken branch; the one
//    exception is the delay slot, the instruction right after a jump or
//    branch, which is kept when it has that jump's or branch's colour;
//  * decodes it and executes J/JAL itself: it flips its colour and sends the
//    target with the new colour to the PC unit, waiting until the PC unit has
//    taken it;
//  * sends the RegRead request to the register bank and keeps the decoded
//    control until the back half has used it.
// The back half pairs that control with RegPort0/1 from the register bank and
// sends the bundle, with the colour the instruction was accepted under, to
// EXE.  EXE's acknowledge carries EXE's colour back; if it differs from the
// colour sent, EXE took a branch and the stage flips its own colour.
// The front half takes a new instruction only after the back half has sent
// the previous one, which in turn waits for the acknowledge of the one before,
// so when an instruction is accepted every earlier branch is resolved except
// possibly the one just before it, whose successor is its delay slot.
// Interfaces are 2-phase channels: if_* (from fetch), j_* (jump redirect),
// rr_* (RegRead), rp_* (RegPorts), ie_* (to EXE, with ie_ack_colour).
// Exchanging the colour with EXE on request and acknowledge follows the
// design description; the delay-slot rule, the wait for the redirect's
// acknowledge and the split into two halves are this design's choices.
module id_stage
  import mips_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      if_req,
  output logic      if_ack,
  input  fetched_t  if_data,
  output logic      j_req,
  input  logic      j_ack,
  output redirect_t j_data,
  output logic      rr_req,
  input  logic      rr_ack,
  output regread_t  rr_data,
  input  logic      rp_req,
  output logic      rp_ack,
  input  regport_t  rp0,
  input  regport_t  rp1,
  output logic      ie_req,
  input  logic      ie_ack,
  input  logic      ie_ack_colour,
  output id_ex_t    ie_data,
  output logic      colour,        // the stage's colour
  output logic      discard_evt,   // one-cycle pulse per discarded instruction
  output logic      jump_evt       // one-cycle pulse per executed J/JAL
);
  // decoded instruction waiting for its RegPorts
  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] pc;
    logic [4:0]  sa;
    logic        colour;
  } held_t;

  logic      ds_pending, ds_colour;
  logic      in_jwait;
  logic      hold_valid;
  held_t     hold;
  logic      sent_colour, ack_seen;
  ctrl_t     d_ctrl;
  regread_t  d_rread;
  logic      d_jump, d_transfer;
  logic      take, accept, send, ack_evt, bflip, jflip;
  logic [3:0]  pc4_seg;     // segment bits [31:28] of the delay-slot address

  decode_unit u_dec (.instr(if_data.instr), .ctrl(d_ctrl), .rread(d_rread),
                     .is_jump(d_jump), .is_transfer(d_transfer));

  assign pc4_seg = 4'((if_data.pc + 32'd4) >> 28);
  assign take    = !hold_valid && !in_jwait && (if_req != if_ack);
  assign accept  = (if_data.colour == colour) || (ds_pending && if_data.colour == ds_colour);
  assign jflip   = take && accept && d_jump;
  assign ack_evt = (ie_ack != ack_seen);
  assign bflip   = ack_evt && (ie_ack_colour != sent_colour);
  assign send    = hold_valid && !in_jwait && (rp_req != rp_ack) && (ie_req == ack_seen) && !ack_evt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      colour      <= 1'b0;
      ds_pending  <= 1'b0;
      ds_colour   <= 1'b0;
      in_jwait    <= 1'b0;
      hold_valid  <= 1'b0;
      hold        <= '0;
      sent_colour <= 1'b0;
      ack_seen    <= 1'b0;
      if_ack      <= 1'b0;
      j_req       <= 1'b0;
      j_data      <= '0;
      rr_req      <= 1'b0;
      rr_data     <= '0;
      rp_ack      <= 1'b0;
      ie_req      <= 1'b0;
      ie_data     <= '0;
      discard_evt <= 1'b0;
      jump_evt    <= 1'b0;
    end else begin
      discard_evt <= take && !accept;
      jump_evt    <= jflip;
      colour      <= colour ^ jflip ^ bflip;
      // ---- front half ----
      if (take) begin
        if_ack <= ~if_ack;
        if (accept) begin
          ds_pending  <= d_transfer;
          ds_colour   <= if_data.colour;
          hold.ctrl   <= d_ctrl;
          hold.pc     <= if_data.pc;
          hold.sa     <= if_data.instr[10:6];
          hold.colour <= colour ^ jflip;
          hold_valid  <= 1'b1;
          rr_data     <= d_rread;
          if (d_jump) begin
            j_data.target <= {pc4_seg, if_data.instr[25:0], 2'b00};
            j_data.colour <= ~colour;
            j_req         <= ~j_req;
            in_jwait      <= 1'b1;
          end else begin
            rr_req <= ~rr_req;
          end
        end
      end
      if (in_jwait && j_req == j_ack) begin
        in_jwait <= 1'b0;
        rr_req   <= ~rr_req;
      end
      // ---- back half ----
      if (ack_evt) ack_seen <= ie_ack;
      if (send) begin
        rp_ack          <= ~rp_ack;
        ie_data.ctrl    <= hold.ctrl;
        ie_data.pc      <= hold.pc;
        ie_data.sa      <= hold.sa;
        ie_data.colour  <= hold.colour;
        ie_data.p0      <= rp0;
        ie_data.p1      <= rp1;
        ie_req          <= ~ie_req;
        sent_colour     <= hold.colour;
        hold_valid      <= 1'b0;
      end
    end
  end

  // Unbuffered channels: a new request is only made on an idle channel.
  a_rr_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (take && accept && !d_jump) |-> (rr_req == rr_ack));
  a_ie_idle: assert property (@(posedge clk) disable iff (!rst_n)
    send |-> (ie_req == ie_ack));
endmodule
