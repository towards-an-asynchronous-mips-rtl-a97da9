// tb_async_mips: end-to-end test of the asynchronous MIPS pipeline.
//
// The testbench holds a small instruction-set reference model of the same
// MIPS-I subset (with branch delay slots).  Each test loads a program and its
// data into both the core and the model, runs the core with random stalls on
// the two memories (so that prefetch depth and stage timing vary from run to
// run), and waits until the program stores a completion word.  It then
// compares all 32 registers and the data-memory region the programs use.
// Test 0 is a directed program: the five-instruction hazard example
// (SUB/AND/OR/ADD/SW on $2), a load-use loop, JAL/JR, a J over a skipped
// instruction, sub-word loads and stores, multiply/divide and every branch
// kind.  Tests 1.. are random straight-line programs over seven registers
// with loads, stores and short forward branches, which make the hazard
// distances 1, 2 and 3 occur often.  The testbench counts how often each
// mechanism of the design happened (forwarding from EX, from MEM, waits in
// EXE for a forward, waits in the register bank for a write-back, the
// four-instruction limit, discarded prefetched instructions, delay slots kept
// across a colour change, taken branches and jumps) and fails for any that
// never did, except the four-instruction limit: the stages between the
// register bank and write-back hold at most four instructions and write-back
// drains quickly, so the limit is a guard that is rarely reached here (its
// count is printed; tb_reg_bank reaches it).  The core runs with all parameters at their defaults.
//
// The programs, the reference model and the mechanism counts are this test's
// own; the behaviour checked is MIPS-I with delay slots, as the design
// intends.
module tb_async_mips;
  import mips_pkg::*;

  localparam int NRAND    = 24;
  localparam int RAND_LEN = 120;
  localparam logic [31:0] DONE_ADDR = 32'hFFC;
  localparam logic [31:0] MAGIC     = 32'h0000_ABCD;

  logic clk = 0, rst_n = 0;
  logic im_stall = 0, dm_stall = 0;
  logic im_load_we = 0, dm_load_we = 0;
  logic [31:0] im_load_addr = 0, im_load_data = 0, dm_load_addr = 0, dm_load_data = 0;
  logic [31:0] dm_peek_addr = 0, dm_peek_data;
  logic id_colour, ex_colour, fwd_ex_evt, fwd_mem_evt, fwd_wait_evt, rb_wait_evt;
  logic discard_evt, jump_evt, taken_evt;

  async_mips dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  // ---------------- watchdog ----------------
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- assembler ----------------
  function automatic logic [31:0] R(input logic [5:0] fn, input int rs, rt, rd, input int sa = 0);
    return {6'h0, 5'(rs), 5'(rt), 5'(rd), 5'(sa), fn};
  endfunction
  function automatic logic [31:0] I(input logic [5:0] op, input int rs, rt, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] Jt(input logic [5:0] op, input int addr);
    return {op, 26'(addr >> 2)};
  endfunction
  localparam logic [31:0] NOP = 32'h0;

  // ---------------- program store ----------------
  logic [31:0] prog [1024];
  int          plen;
  logic [31:0] dinit [1024];

  task automatic emit(input logic [31:0] w);
    prog[plen] = w; plen++;
  endtask

  // ---------------- reference model ----------------
  logic [31:0] mr [32];
  logic [31:0] mhi, mlo;
  logic [31:0] mm [1024];

  task automatic ref_run(output int steps);
    logic [31:0] pc, npc, ins, a, b, ea, tgt, w;
    logic [63:0] p;
    logic [5:0] op, fn;
    int rs, rt, rd, sa;
    logic br;
    for (int i = 0; i < 32; i++) mr[i] = 0;
    mhi = 0; mlo = 0;
    for (int i = 0; i < 1024; i++) mm[i] = dinit[i];
    pc = 0; npc = 4; steps = 0;
    while (steps < 100000) begin
      ins = prog[pc[11:2]];
      op = ins[31:26]; fn = ins[5:0];
      rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11]; sa = ins[10:6];
      a = mr[rs]; b = mr[rt];
      br = 0; tgt = npc + {{14{ins[15]}}, ins[15:0], 2'b00};
      // the end loop: branch to itself with $0
      if (ins == I(OP_BEQ, 0, 0, -1)) break;
      steps++;
      case (op)
        OP_RTYPE: case (fn)
          FN_ADD, FN_ADDU: mr[rd] = a + b;
          FN_SUB, FN_SUBU: mr[rd] = a - b;
          FN_AND: mr[rd] = a & b;
          FN_OR:  mr[rd] = a | b;
          FN_XOR: mr[rd] = a ^ b;
          FN_NOR: mr[rd] = ~(a | b);
          FN_SLT: mr[rd] = ($signed(a) < $signed(b)) ? 1 : 0;
          FN_SLTU: mr[rd] = (a < b) ? 1 : 0;
          FN_SLL: mr[rd] = b << sa;
          FN_SRL: mr[rd] = b >> sa;
          FN_SRA: mr[rd] = $signed(b) >>> sa;
          FN_SLLV: mr[rd] = b << a[4:0];
          FN_SRLV: mr[rd] = b >> a[4:0];
          FN_SRAV: mr[rd] = $signed(b) >>> a[4:0];
          FN_JR:   begin br = 1; tgt = a; end
          FN_JALR: begin br = 1; tgt = a; mr[rd] = pc + 8; end
          FN_MFHI: mr[rd] = mhi;
          FN_MFLO: mr[rd] = mlo;
          FN_MTHI: mhi = a;
          FN_MTLO: mlo = a;
          FN_MULT: begin p = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}); {mhi, mlo} = p; end
          FN_MULTU: begin p = {32'h0, a} * {32'h0, b}; {mhi, mlo} = p; end
          FN_DIV: if (b == 0) begin mlo = '1; mhi = a; end
                  else begin mlo = $signed(a) / $signed(b); mhi = $signed(a) % $signed(b); end
          FN_DIVU: if (b == 0) begin mlo = '1; mhi = a; end
                   else begin mlo = a / b; mhi = a % b; end
          default: ;
        endcase
        OP_REGIMM: br = rt[0] ? ($signed(a) >= 0) : ($signed(a) < 0);
        OP_J:   begin br = 1; tgt = {npc[31:28], ins[25:0], 2'b00}; end
        OP_JAL: begin br = 1; tgt = {npc[31:28], ins[25:0], 2'b00}; mr[31] = pc + 8; end
        OP_BEQ:  br = (a == b);
        OP_BNE:  br = (a != b);
        OP_BLEZ: br = ($signed(a) <= 0);
        OP_BGTZ: br = ($signed(a) > 0);
        OP_ADDI, OP_ADDIU: mr[rt] = a + {{16{ins[15]}}, ins[15:0]};
        OP_SLTI:  mr[rt] = ($signed(a) < $signed({{16{ins[15]}}, ins[15:0]})) ? 1 : 0;
        OP_SLTIU: mr[rt] = (a < {{16{ins[15]}}, ins[15:0]}) ? 1 : 0;
        OP_ANDI: mr[rt] = a & {16'h0, ins[15:0]};
        OP_ORI:  mr[rt] = a | {16'h0, ins[15:0]};
        OP_XORI: mr[rt] = a ^ {16'h0, ins[15:0]};
        OP_LUI:  mr[rt] = {ins[15:0], 16'h0};
        OP_LB, OP_LBU, OP_LH, OP_LHU, OP_LW: begin
          ea = a + {{16{ins[15]}}, ins[15:0]};
          w = mm[ea[11:2]];
          case (op)
            OP_LW:  mr[rt] = w;
            OP_LB:  begin w = w >> (8 * ea[1:0]);  mr[rt] = {{24{w[7]}}, w[7:0]}; end
            OP_LBU: begin w = w >> (8 * ea[1:0]);  mr[rt] = {24'h0, w[7:0]}; end
            OP_LH:  begin w = w >> (16 * ea[1]);   mr[rt] = {{16{w[15]}}, w[15:0]}; end
            default: begin w = w >> (16 * ea[1]);  mr[rt] = {16'h0, w[15:0]}; end
          endcase
        end
        OP_SB, OP_SH, OP_SW: begin
          ea = a + {{16{ins[15]}}, ins[15:0]};
          w = mm[ea[11:2]];
          case (op)
            OP_SW: w = b;
            OP_SH: w[16*ea[1] +: 16] = b[15:0];
            default: w[8*ea[1:0] +: 8] = b[7:0];
          endcase
          mm[ea[11:2]] = w;
        end
        default: ;
      endcase
      mr[0] = 0;
      pc = npc;
      npc = br ? tgt : npc + 4;
    end
  endtask

  // ---------------- programs ----------------
  task automatic end_program();
    emit(I(OP_ORI, 0, 30, MAGIC));
    emit(I(OP_SW, 0, 30, DONE_ADDR));
    emit(I(OP_BEQ, 0, 0, -1));   // stay here
    emit(NOP);
  endtask

  task automatic directed_program();
    int loop_at, skip_at, func_at, jal_at, jpos, b1, b2;
    plen = 0;
    for (int i = 0; i < 1024; i++) begin prog[i] = NOP; dinit[i] = 0; end
    for (int i = 0; i < 8; i++) dinit[(32'h200 >> 2) + i] = 32'(i * 3 + 1);
    dinit[32'h280 >> 2] = 32'h8899_AABB;
    // the hazard example: $2 is used by the four instructions after SUB
    emit(I(OP_ADDI, 0, 1, 20));
    emit(I(OP_ADDI, 0, 3, 4));
    emit(I(OP_ADDI, 0, 15, 77));
    emit(R(FN_SUB, 1, 3, 2));        // sub $2,$1,$3
    emit(R(FN_AND, 2, 4, 3));        // and $3,$2,$4  (EX forward)
    emit(R(FN_OR,  1, 2, 4));        // or  $4,$1,$2  (MEM forward)
    emit(R(FN_ADD, 1, 2, 5));        // add $5,$1,$2  (register bank)
    emit(I(OP_SW, 2, 15, 100));      // sw  $15,100($2)
    // load-use loop: sum eight words
    emit(I(OP_ORI, 0, 8, 32'h200));
    emit(I(OP_ADDI, 0, 9, 8));
    emit(R(FN_ADD, 0, 0, 10));
    loop_at = plen;
    emit(I(OP_LW, 8, 11, 0));
    emit(R(FN_ADD, 10, 11, 10));     // needs the load just before
    emit(I(OP_ADDI, 8, 8, 4));
    emit(I(OP_ADDI, 9, 9, -1));
    emit(I(OP_BNE, 9, 0, loop_at - (plen + 1)));
    emit(I(OP_ADDI, 20, 20, 1));     // delay slot: runs every time
    emit(I(OP_SW, 0, 10, 32'h300));
    // call and return
    jal_at = plen;
    emit(NOP);                       // patched to JAL below
    emit(I(OP_ADDI, 0, 21, 3));      // delay slot
    emit(R(FN_ADD, 21, 25, 22));
    // jump over an instruction
    jpos = plen;
    emit(NOP);                       // patched to J
    emit(I(OP_ADDI, 0, 26, 1));      // delay slot
    emit(I(OP_ADDI, 0, 23, 99));     // must be skipped
    skip_at = plen;
    // sub-word memory access
    emit(I(OP_ORI, 0, 8, 32'h280));
    emit(I(OP_LB,  8, 12, 1));
    emit(I(OP_LBU, 8, 13, 1));
    emit(I(OP_LH,  8, 14, 2));
    emit(I(OP_LHU, 8, 16, 2));
    emit(I(OP_SB,  8, 13, 4));
    emit(I(OP_SH,  8, 14, 6));
    emit(I(OP_LW,  8, 17, 4));
    // multiply / divide
    emit(I(OP_ADDI, 0, 1, -7));
    emit(I(OP_ADDI, 0, 3, 3));
    emit(R(FN_MULT, 1, 3, 0));
    emit(R(FN_MFLO, 0, 0, 18));
    emit(R(FN_MFHI, 0, 0, 19));
    emit(R(FN_DIV, 1, 3, 0));
    emit(R(FN_MFLO, 0, 0, 27));
    emit(R(FN_MFHI, 0, 0, 28));
    emit(R(FN_DIVU, 1, 3, 0));
    emit(R(FN_MFLO, 0, 0, 29));
    emit(R(FN_MULTU, 1, 1, 0));
    emit(R(FN_MFHI, 0, 0, 6));
    emit(R(FN_MTLO, 3, 0, 0));
    emit(R(FN_MFLO, 0, 0, 7));
    // shifts, compares
    emit(I(OP_LUI, 0, 5, 32'h8001));
    emit(R(FN_SRA, 0, 5, 9, 4));
    emit(R(FN_SRL, 0, 5, 10, 4));
    emit(R(FN_SLL, 0, 5, 11, 3));
    emit(R(FN_SRAV, 3, 5, 24));
    emit(R(FN_NOR, 5, 3, 4));
    emit(R(FN_XOR, 5, 4, 4));
    emit(R(FN_SLT, 1, 3, 2));
    emit(R(FN_SLTU, 1, 3, 15));
    emit(I(OP_SLTI, 1, 20, -8));
    emit(I(OP_SLTIU, 3, 20, 5));
    emit(I(OP_XORI, 5, 13, 32'hFFFF));
    // every branch kind, taken and not taken
    emit(I(OP_BLEZ, 1, 0, 2));       // taken (-7 <= 0)
    emit(I(OP_ADDI, 26, 26, 10));    // delay slot
    emit(I(OP_ADDI, 26, 26, 100));   // skipped
    emit(I(OP_BGTZ, 1, 0, 2));       // not taken
    emit(I(OP_ADDI, 26, 26, 1000));
    emit(I(OP_ADDI, 26, 26, 10000));
    emit(I(OP_REGIMM, 1, 0, 2));     // BLTZ taken
    emit(NOP);
    emit(I(OP_ADDI, 26, 26, 7));     // skipped
    emit(I(OP_REGIMM, 1, 1, 2));     // BGEZ not taken
    emit(NOP);
    emit(I(OP_ADDI, 26, 26, 5));
    emit(I(OP_BEQ, 3, 3, 3));        // taken, with a branch target depending on a load
    emit(I(OP_LW, 8, 12, 0));        // delay slot load
    emit(I(OP_ADDI, 26, 26, 300));   // skipped
    emit(I(OP_ADDI, 26, 26, 301));   // skipped
    emit(R(FN_ADD, 12, 12, 12));     // load-use after a branch
    emit(I(OP_ORI, 0, 1, 0));
    b1 = plen;
    emit(NOP);                       // patched: JALR to the next block
    emit(R(FN_ADD, 1, 1, 1));        // delay slot
    emit(I(OP_ADDI, 26, 26, 400));   // skipped
    b2 = plen;
    prog[b1 - 1] = I(OP_ORI, 0, 1, b2 * 4);
    prog[b1] = R(FN_JALR, 1, 0, 4);
    emit(I(OP_SW, 0, 26, 32'h304));
    emit(I(OP_SW, 0, 4, 32'h308));
    end_program();
    // subroutine
    func_at = plen;
    emit(R(FN_ADD, 31, 0, 24));
    emit(R(FN_JR, 31, 0, 0));
    emit(I(OP_ADDI, 0, 25, 11));     // delay slot
    prog[jal_at] = Jt(OP_JAL, func_at * 4);
    prog[jpos]   = Jt(OP_J, skip_at * 4);
  endtask

  // random straight-line code with forward branches, dense register reuse
  task automatic random_program();
    int n, k, r1, r2, r3, off;
    plen = 0;
    for (int i = 0; i < 1024; i++) begin prog[i] = NOP; dinit[i] = 0; end
    for (int i = 0; i < 16; i++) dinit[(32'h400 >> 2) + i] = $urandom;
    for (int r = 1; r < 8; r++) emit(I(OP_ADDI, 0, r, $urandom_range(0, 40) - 20));
    emit(I(OP_ORI, 0, 8, 32'h400));
    n = 0;
    while (n < RAND_LEN) begin
      r1 = $urandom_range(1, 7); r2 = $urandom_range(0, 7); r3 = $urandom_range(0, 7);
      k = $urandom_range(0, 99);
      if (k < 40) begin
        case ($urandom_range(0, 7))
          0: emit(R(FN_ADDU, r2, r3, r1));
          1: emit(R(FN_SUBU, r2, r3, r1));
          2: emit(R(FN_AND, r2, r3, r1));
          3: emit(R(FN_OR, r2, r3, r1));
          4: emit(R(FN_XOR, r2, r3, r1));
          5: emit(R(FN_SLT, r2, r3, r1));
          6: emit(R(FN_SLLV, r2, r3, r1));
          default: emit(R(FN_SRA, 0, r3, r1, $urandom_range(0, 31)));
        endcase
      end else if (k < 55) begin
        emit(I(OP_ADDIU, r2, r1, $urandom_range(0, 200) - 100));
      end else if (k < 70) begin
        off = $urandom_range(0, 63);
        case ($urandom_range(0, 2))
          0: emit(I(OP_LW, 8, r1, off & ~3));
          1: emit(I(OP_LB, 8, r1, off));
          default: emit(I(OP_LHU, 8, r1, off & ~1));
        endcase
      end else if (k < 80) begin
        off = $urandom_range(0, 63);
        case ($urandom_range(0, 2))
          0: emit(I(OP_SW, 8, r2, off & ~3));
          1: emit(I(OP_SB, 8, r2, off));
          default: emit(I(OP_SH, 8, r2, off & ~1));
        endcase
      end else if (k < 85) begin
        emit(R(FN_MULT, r2, r3, 0));
        emit(R($urandom_range(0, 1) ? FN_MFLO : FN_MFHI, 0, 0, r1));
      end else if (k < 95) begin
        // short forward branch; its delay slot is an ALU instruction
        case ($urandom_range(0, 3))
          0: emit(I(OP_BEQ, r2, r3, $urandom_range(1, 3)));
          1: emit(I(OP_BNE, r2, r3, $urandom_range(1, 3)));
          2: emit(I(OP_BGTZ, r2, 0, $urandom_range(1, 3)));
          default: emit(I(OP_REGIMM, r2, $urandom_range(0, 1), $urandom_range(1, 3)));
        endcase
        emit(R(FN_ADDU, r2, r3, r1));
      end else begin
        emit(Jt(OP_J, (plen + 2 + $urandom_range(0, 2)) * 4));
        emit(R(FN_XOR, r2, r3, r1));
      end
      n++;
    end
    // targets of the last branches must exist
    for (int i = 0; i < 4; i++) emit(NOP);
    end_program();
  endtask

  // ---------------- mechanism counters ----------------
  int n_fwd_ex, n_fwd_mem, n_fwd_wait, n_rb_wait, n_limit, n_discard, n_ds_keep;
  int n_taken, n_jump, n_instr;
  always @(posedge clk) if (rst_n) begin
    if (fwd_ex_evt)   n_fwd_ex++;
    if (fwd_mem_evt)  n_fwd_mem++;
    if (fwd_wait_evt) n_fwd_wait++;
    if (rb_wait_evt)  n_rb_wait++;
    if (discard_evt)  n_discard++;
    if (taken_evt)    n_taken++;
    if ((dut.rr_req != dut.rr_ack) && (dut.rp_req == dut.rp_ack) && !dut.u_rb.can_issue) n_limit++;
    if (dut.u_id.take && dut.u_id.accept && dut.if_data.colour != id_colour) n_ds_keep++;
    if (jump_evt) n_jump++;
    if (dut.ie_req != dut.ie_ack && dut.u_ex.fire) n_instr++;
  end

  // ---------------- one run ----------------
  task automatic run_test(input int t, input int im_p, input int dm_p);
    int steps, start, errs;
    logic [31:0] got;
    ref_run(steps);
    rst_n = 0;
    repeat (2) @(posedge clk);
    // load both memories through the load ports while in reset
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      im_load_we = 1; im_load_addr = i * 4; im_load_data = prog[i];
      dm_load_we = 1; dm_load_addr = i * 4; dm_load_data = (i == (DONE_ADDR >> 2)) ? 0 : dinit[i];
    end
    @(negedge clk);
    im_load_we = 0; dm_load_we = 0;
    dm_peek_addr = DONE_ADDR;
    rst_n = 1;
    start = cycles;
    while (dm_peek_data != MAGIC && cycles - start < 200000) begin
      @(negedge clk);
      im_stall = ($urandom_range(0, 99) < im_p);
      dm_stall = ($urandom_range(0, 99) < dm_p);
    end
    im_stall = 0; dm_stall = 0;
    repeat (60) @(negedge clk);
    checks++;
    if (dm_peek_data != MAGIC) begin
      failures++;
      $display("test %0d: program did not finish", t);
    end
    errs = 0;
    for (int r = 0; r < 32; r++) begin
      checks++;
      if (dut.u_rb.regs[r] !== mr[r]) begin
        failures++; errs++;
        if (errs < 8) $display("test %0d: $%0d = %h, expected %h", t, r, dut.u_rb.regs[r], mr[r]);
      end
    end
    for (int a = 32'h100; a < 32'h480; a += 4) begin
      dm_peek_addr = a;
      #1;
      got = dm_peek_data;
      checks++;
      if (got !== mm[a >> 2]) begin
        failures++; errs++;
        if (errs < 8) $display("test %0d: mem[%h] = %h, expected %h", t, a, got, mm[a >> 2]);
      end
    end
    $display("test %0d: %0d instructions in the model, %0d cycles, %0d errors",
             t, steps, cycles - start, errs);
  endtask

  initial begin
    directed_program();
    run_test(0, 20, 20);
    // the directed program again without memory stalls
    directed_program();
    run_test(1, 0, 0);
    for (int t = 0; t < NRAND; t++) begin
      random_program();
      // the last runs slow the data memory down heavily
      run_test(t + 2, (t % 4) * 15, (t >= NRAND - 6) ? 75 : (t % 3) * 20);
    end
    $display("mechanisms: fwd_ex=%0d fwd_mem=%0d fwd_wait=%0d regbank_wait=%0d limit4=%0d discard=%0d delay_slot_kept=%0d taken=%0d jumps=%0d",
             n_fwd_ex, n_fwd_mem, n_fwd_wait, n_rb_wait, n_limit, n_discard, n_ds_keep, n_taken, n_jump);
    checks++; if (n_fwd_ex == 0)   begin failures++; $display("EX forwarding never happened"); end
    checks++; if (n_fwd_mem == 0)  begin failures++; $display("MEM forwarding never happened"); end
    checks++; if (n_fwd_wait == 0) begin failures++; $display("EXE never waited for a forward"); end
    checks++; if (n_rb_wait == 0)  begin failures++; $display("register bank never waited"); end
    checks++; if (n_discard == 0)  begin failures++; $display("no instruction discarded"); end
    checks++; if (n_ds_keep == 0)  begin failures++; $display("no delay slot kept across a colour change"); end
    checks++; if (n_taken == 0)    begin failures++; $display("no branch taken"); end
    checks++; if (n_jump == 0)     begin failures++; $display("no jump executed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
