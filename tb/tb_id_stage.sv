// tb_id_stage: self-checking test of the ID stage's local control.
// The testbench surrounds the stage with models of its neighbours:
//  * a fetch model with a prefetch queue whose depth varies at random, so a
//    random number of instructions of the old colour follow each redirect;
//  * a register-bank model answering RegRead after random delays;
//  * an EXE model that decides each branch at random, flips its
//    colour and redirects the fetch model on a taken branch, and acknowledges
//    with its colour;
//  * an arbiter model acknowledging jump redirects.
// A random program of ALU instructions, conditional branches and jumps
// (never a transfer in a delay slot) is walked by a reference sequencer with
// delay-slot semantics.  Every bundle ID sends to EXE must be the next
// instruction of that reference sequence, with the matching RegRead; no stale
// instruction may get through, and discards, jumps, taken branches and delay
// slots kept across a colour change must all occur.
//
// Discarding by colour, jumps in ID and the colour returned by EXE follow the
// published scheme; the delay-slot rule checked is this design's own.
module tb_id_stage;
  import mips_pkg::*;
  localparam int WORDS = 256;
  logic clk = 0, rst_n = 0;
  logic if_req = 0, if_ack, j_req, j_ack = 0, rr_req, rr_ack = 0, rp_req = 0, rp_ack;
  logic ie_req, ie_ack = 0, ie_ack_colour = 0, colour, discard_evt, jump_evt;
  fetched_t if_data = '0;
  redirect_t j_data;
  regread_t rr_data;
  regport_t rp0 = '0, rp1 = '0;
  id_ex_t ie_data;
  int checks = 0, failures = 0;

  id_stage dut (.*);
  always #5 clk = ~clk;

  logic [31:0] prog [WORDS];
  function automatic logic is_branch(input logic [31:0] w); return w[31:26] == 6'h04; endfunction
  function automatic logic is_j(input logic [31:0] w);      return w[31:26] == 6'h02; endfunction

  initial begin
    int i;
    i = 0;
    while (i < WORDS - 2) begin
      case ($urandom_range(0, 5))
        0: begin prog[i] = {6'h04, 5'($urandom_range(1, 9)), 5'($urandom_range(1, 9)), 16'($urandom_range(0, 40) - 20)}; i++; end
        1: begin prog[i] = {6'h02, 26'($urandom_range(0, WORDS - 3))}; i++; end
        default: ;
      endcase
      prog[i] = {6'h0, 5'($urandom_range(1, 9)), 5'($urandom_range(1, 9)), 5'($urandom_range(1, 9)), 5'h0, 6'h21};
      i++;
    end
    prog[WORDS - 2] = {6'h02, 26'd0};
    prog[WORDS - 1] = {6'h0, 5'd1, 5'd2, 5'd3, 5'h0, 6'h21};
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------- fetch model ----------
  fetched_t q[$];
  logic [31:0] fpc = 0;
  logic fcol = 0;
  // redirect requests from the EXE model
  logic ex_redir = 0;
  redirect_t ex_rd;
  always @(negedge clk) if (rst_n) begin
    // redirects: EXE model first, then a jump
    if (ex_redir) begin fpc = ex_rd.target; fcol = ex_rd.colour; ex_redir = 0; end
    else if (j_req != j_ack) begin fpc = j_data.target; fcol = j_data.colour; j_ack = ~j_ack; end
    if (q.size() < $urandom_range(1, 4)) begin
      q.push_back({prog[fpc[9:2] % WORDS], fpc, fcol});
      fpc = (fpc + 4) % (WORDS * 4);
    end
    if (if_req == if_ack && q.size() > 0) begin
      if_data = q.pop_front();
      if_req = ~if_req;
    end
  end

  // ---------- register bank model ----------
  int nrr = 0;
  always @(negedge clk) if (rst_n) begin
    if (rr_req != rr_ack && rp_req == rp_ack && $urandom_range(0, 2) == 0) begin
      rp0.data = nrr; rp1.data = ~nrr; rp0.fw = FW_REG; rp1.fw = FW_REG;
      rr_ack = ~rr_ack; rp_req = ~rp_req; nrr++;
    end
  end

  // ---------- reference sequence and EXE model ----------
  logic [31:0] rpc = 0, rnpc = 4;
  logic excol = 0;
  int nb = 0, n_taken = 0, n_disc = 0, n_jump = 0, n_ds = 0;
  always @(posedge clk) if (rst_n) begin
    if (discard_evt) n_disc++;
    if (jump_evt) n_jump++;
    if (dut.take && dut.accept && if_data.colour != colour) n_ds++;
  end

  initial begin
    logic [31:0] w, tgt;
    logic tk, bt;
    ctrl_t ec; regread_t err; logic ej, et;
    repeat (2) @(negedge clk); rst_n = 1;
    while (nb < 3000) begin
      @(negedge clk);
      if (ie_req != ie_ack && $urandom_range(0, 1) == 0) begin
        w = prog[rpc[9:2]];
        checks++;
        if (ie_data.pc !== rpc) begin
          failures++; $display("bundle %0d: pc %h expected %h", nb, ie_data.pc, rpc);
        end
        checks++;
        if (ie_data.p0.data !== 32'(nb) || ie_data.p1.data !== ~32'(nb)) begin
          failures++; $display("bundle %0d: RegPorts not paired in order", nb);
        end
        // reference next pc (delay slots)
        bt = $urandom_range(0, 1);
        tk = 0;
        if (is_j(w)) begin tk = 1; tgt = {rnpc[31:28], w[25:0], 2'b00}; end
        if (is_branch(w) && bt) begin
          tk = 1; tgt = rnpc + {{14{w[15]}}, w[15:0], 2'b00};
          if (tgt >= WORDS * 4 - 8) tgt = 0;
        end
        // EXE model
        excol = ie_data.colour;
        if (is_branch(w) && bt) begin
          excol = ~excol;
          ex_rd.target = tgt; ex_rd.colour = excol; ex_redir = 1;
          n_taken++;
        end
        ie_ack_colour = excol;
        ie_ack = ~ie_ack;
        rpc = rnpc;
        rnpc = tk ? tgt : rnpc + 4;
        nb++;
      end
    end
    $display("bundles=%0d discards=%0d jumps=%0d taken=%0d delay_slots_kept=%0d", nb, n_disc, n_jump, n_taken, n_ds);
    checks++; if (n_disc == 0)  begin failures++; $display("no discard"); end
    checks++; if (n_jump == 0)  begin failures++; $display("no jump"); end
    checks++; if (n_taken == 0) begin failures++; $display("no taken branch"); end
    checks++; if (n_ds == 0)    begin failures++; $display("no delay slot kept across a colour change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // every RegRead matches the instruction the stage holds
  always @(posedge clk) if (rst_n && dut.take && dut.accept) begin
    checks++;
    if (dut.d_rread.rs !== if_data.instr[25:21]) begin failures++; $display("RegRead rs wrong"); end
  end
endmodule
