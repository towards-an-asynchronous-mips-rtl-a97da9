# An asynchronous-style five-stage MIPS pipeline

This is a MIPS-I integer pipeline (IF, ID, EXE, MEM, WB) in which no central
controller coordinates the stages. Each stage has its own small controller
and talks to its neighbours over request/acknowledge channels. A stage moves
on when its inputs have arrived and its output channel is free. That makes
the two classic pipeline problems harder, because no unit sees the whole
pipeline at once:

* **Data hazards.** A normal forwarding unit compares the register numbers of
  the instructions in EXE, MEM and WB in the same cycle. With decoupled
  stages there is no such cycle. Here, the register bank decides at read
  time where each operand will come from, using only what it remembers of
  earlier reads. It sends that decision to EXE with the operand.
* **Control hazards.** The fetch unit runs ahead on its own, so nobody knows
  how many wrong-path instructions a jump or branch leaves behind. Each
  instruction carries a one-bit *colour*. A redirect flips the colour, and
  ID drops instructions of the old colour. Jumps are taken in ID and
  branches in EXE, so the two stages must agree on the colour. They swap
  colour information on the channel between them.

The RTL models the asynchronous channels with a clock (see *Channels*). It
is fully synthesizable. It runs real MIPS programs, including branch delay
slots, and the results match an instruction-level reference model.

## Pipeline at a glance

```
             redirect_arbiter <---------- jump (ID) / branch (EXE)
                    |
                    v
  fetch_unit --addr--> imem --instr--> fetch_unit --prefetch FIFO--> id_stage
                                                                      |   ^
                                      RegRead (18 b) / RegPort0,1 (2x34 b)
                                                                      v   |
                                                         reg_bank (+ dhdt)
                                                                      ^
  id_stage --bundle--> exe_stage --> mem_stage <--> dmem              |
              <--ack+colour-- |  ^        |                           |
                              |  '--------+ final result (forward)    |
                              v                                       |
                           fw_unit             mem_stage --> wb_stage-'  RegWrite
```

| module | role |
|---|---|
| `mips_pkg` | opcodes, control bundle, channel payload structs |
| `fetch_unit` | PC, +4, redirect mux, colour bit, 4-entry prefetch FIFO |
| `imem`, `dmem` | word memories with a channel interface, a stall input and a load port |
| `redirect_arbiter` | merges jump redirects from ID and branch redirects from EXE |
| `decode_unit` | instruction to control bundle and RegRead request |
| `id_stage` | colour check, jumps, RegRead issue, sends the bundle to EXE |
| `dhdt` | data hazard detection table (Clean bit and 2-bit Index per register, CurIndex) |
| `reg_bank` | 32x32 register file around the `dhdt`; serves RegRead, takes RegWrite |
| `fw_unit` | EXE's 4-entry forwarded-result buffer and operand multiplexers |
| `alu`, `muldiv` | ALU/shifter; multiplier/divider with HI/LO |
| `exe_stage` | operands, execution, branch decision and target, colour |
| `mem_stage` | load/store with byte lanes, extension, result forwarding |
| `wb_stage` | result select and the RegWrite channel |
| `async_mips` | top level |

## Channels

Every connection between stages is a 2-phase bundled-data channel:

* The sender puts data on the bus and toggles `req`.
* The receiver takes the data and toggles `ack`.
* A transfer is pending while `req != ack`. The data must hold still until
  then.

Each toggle is a flip-flop on the common clock `clk`. So every hand-over
costs at least one clock edge, and a stage's delay is a whole number of
cycles. What stays asynchronous in spirit is that no stage assumes how long
another takes. The memories have `stall` inputs (`im_stall`, `dm_stall` on
the top). A testbench drives them randomly, so each run has a different
relative timing. All tests pass under such random stalls.

Each channel has assertions for its handshake rules, for example "do not
start a new transfer while one is pending". Reset is asynchronous and active
low.

## Data hazards: hazard table plus forward buffer

### What the register bank records

`dhdt` keeps three bits per register:

* `Clean`: no write to it is pending.
* `Index`: the 2-bit number of the instruction that will write it.

It also keeps `CurIndex`, the number of the instruction now entering the
bank (mod 4). At most four instructions may be between ID and WB, so two
bits are enough. `dhdt` enforces that limit with an in-flight counter: a
fifth RegRead waits.

When an instruction's RegRead arrives, each source register is classified:

| state of the source register | code on RegPort | meaning for EXE |
|---|---|---|
| Clean | `FW_REG` (00) | use the data on the port |
| Index = CurIndex-1 | `FW_EX` (01) | take the result of the previous instruction |
| Index = CurIndex-2 | `FW_MEM` (10) | take the result of the one before that |
| Index = CurIndex-3 | — | the bank waits for that write-back, then passes the value straight through |

After that, the destination register (if any) is marked not Clean with
Index = CurIndex, and CurIndex advances.

Worked example, with `$2` written by the first instruction:

```
SUB $2,$1,$3   CurIndex 0   operands clean; $2 <- Index 0
AND $3,$2,$4   CurIndex 1   $2: Index 0 = CurIndex-1  -> FW_EX
OR  $4,$1,$2   CurIndex 2   $2: Index 0 = CurIndex-2  -> FW_MEM
ADD $5,$1,$2   CurIndex 3   $2: Index 0 = CurIndex-3  -> bank waits for SUB's write-back
SW  $5,100($2) CurIndex 0   $2 clean again
```

`tb_dhdt` replays exactly this sequence.

### Write-back

Every instruction leaves through WB and sends a RegWrite, even one that
writes no register (`we` = 0). The RegWrite carries the instruction's 2-bit
index. This lets the in-flight counter fall.

It also fixes a subtle case. Suppose two instructions in flight write the
same register. The older one's write-back must not mark the register Clean,
because the younger write is still pending. So Clean is set only when the
index in the RegWrite equals the stored Index. The register data itself is
always written.

### Where forwarded values come from

EXE does not sit next to MEM and WB in time, so it cannot read "the ALU
output register" at the right moment. Instead `fw_unit` holds a buffer of
four entries, one per index value.

* When EXE finishes an instruction that writes a register and is not a load,
  it writes the result into entry `idx`.
* When MEM finishes any register-writing instruction, it writes the final
  value (loaded data or ALU result) into entry `idx` as well.
* EXE counts its own instructions, so its index always equals the bank's
  CurIndex at read time. For `FW_EX` it looks at entry `idx-1`; for `FW_MEM`
  it looks at entry `idx-2`.
* If that entry has not been written yet, EXE waits.

That wait covers the load-use case: a load's result appears only when MEM
delivers it. EXE writing an entry invalidates the old contents, so a stale
value of a previous user of the same index is never taken.

## Control hazards: colours

* **Fetch.** `fetch_unit` sends every address to `imem` together with the
  current colour. The instruction comes back with that colour and enters a
  4-entry prefetch FIFO. A redirect (new target, new colour) empties the
  FIFO and has priority over the next sequential fetch. One imem request is
  outstanding at a time. A request already sent completes with its old
  colour, and ID throws it away.
* **ID.** ID keeps its own colour. An instruction whose colour differs is
  discarded, with one exception: the delay slot (below).
  * J and JAL are executed in ID. ID flips its colour, sends target and new
    colour through the arbiter to the fetch unit, and waits until that
    redirect is accepted.
  * The new colour reaches EXE in the next bundle. EXE adopts a bundle's
    colour whenever it differs from its own.
* **EXE.** Branches, JR and JALR are decided in EXE. When one is taken, EXE
  flips its colour and sends target and colour to the arbiter. The new
  colour also travels back to ID on the acknowledge of the ID-to-EXE
  channel (`ie_ack_colour`). If that colour differs from the one ID sent
  with the bundle, ID flips its own colour.
* **Delay slots.** The instruction after a jump or branch always executes.
  After a jump, ID already has the new colour while the delay slot still
  has the old one. So ID remembers the colour of the last jump or branch
  and accepts exactly one more instruction of that colour.
* **Branches behind a delay slot.** ID holds the delay slot until the
  branch's acknowledge has arrived. Anything after the delay slot is
  therefore checked against the updated colour.
* **Arbiter.** `redirect_arbiter` gives the branch priority over a
  simultaneous jump, since the branch is the older instruction. It
  acknowledges an input only after the fetch unit has taken the redirect,
  so redirects cannot overtake each other.

## Stage details

* **ID** works in two halves that run side by side.
  * The front half takes an instruction from the FIFO, checks its colour,
    decodes it, sends the RegRead, and keeps the control bundle.
  * The back half waits for the RegPorts, joins them with the kept control,
    and sends the bundle to EXE. It then waits for the acknowledge before
    sending the next one.
  * So a register read of the next instruction overlaps EXE's work on the
    current one.
* **EXE** fires when all of these hold: the bundle is there, every forwarded
  operand it needs is present, the MEM channel is free, and, for a taken
  branch, the redirect channel is free.
  * The branch target is PC+4+(offset<<2). JAL and JALR write PC+8.
  * MULT, MULTU, DIV, DIVU, MTHI and MTLO update HI/LO in one step.
  * Division by zero gives LO = all ones and HI = dividend. MIPS leaves this
    result undefined.
* **MEM** latches the bundle and acknowledges EXE at once. It then does the
  memory access: a single-word request with byte enables, little-endian.
  For a load it picks the byte or half-word and sign- or zero-extends it.
  Stores use the same request with the write flag set.
* **WB** selects loaded data or the ALU result and sends the RegWrite.

## Instruction set

Implemented:

* ALU: ADD, ADDU, SUB, SUBU, AND, OR, XOR, NOR, SLT, SLTU
* shifts: SLL, SRL, SRA, SLLV, SRLV, SRAV
* multiply/divide: MULT, MULTU, DIV, DIVU, MFHI, MFLO, MTHI, MTLO
* immediates: ADDI, ADDIU, SLTI, SLTIU, ANDI, ORI, XORI, LUI
* loads/stores: LB, LBU, LH, LHU, LW, SB, SH, SW
* branches and jumps: BEQ, BNE, BLEZ, BGTZ, BLTZ, BGEZ, J, JAL, JR, JALR

There are no exceptions, interrupts, coprocessors or TLB:

* ADD, SUB and ADDI do not trap on overflow.
* Unknown opcodes execute as NOPs.
* Loads have no load delay slot: a dependent instruction simply waits.
* A jump placed in a branch's delay slot is not supported. MIPS forbids it
  anyway.

## Departures from the published design and open points

* **Clocked model.** The source describes a self-timed circuit. Here each
  channel is a pair of toggle registers on a common clock. The handshake
  structure and stage decoupling are kept; gate-level self-timing is not.
* **RegWrite is wider.** It carries a write-enable bit and the producer's
  2-bit index on top of the 5-bit register number and 32-bit data (40 bits
  instead of 37).
  * The index lets a register become Clean only on the write of its latest
    producer. The published algorithm sets Clean on every write, which goes
    wrong when two writes to one register are in flight.
  * The enable lets non-writing instructions retire, so the four-instruction
    limit can be enforced.
* **Four-instruction limit.** The source states the limit but not how it is
  kept. Here the register bank counts instructions between read and
  write-back. In the full pipeline the limit is rarely reached, because WB
  drains quickly. `tb_reg_bank` drives it there.
* **Worked example label.** The source's worked example labels the
  CurIndex-1 case "forwarded from MEM", while its algorithm says "from EX".
  The algorithm is followed (`FW_EX`).
* **Forward buffer.** The source only says that a buffer of forwarded
  results removes the coupling between EXE and MEM/WB. Its size (4, one per
  index), who writes it, and EXE waiting on an empty entry are this design's
  choices.
* **No acknowledge of forwarded results.** The source has EXE acknowledge
  a forwarded result it has used. Here a buffer entry is simply overwritten
  by the next instruction with the same index. Its last possible reader is
  two instructions later, and the four-instruction limit keeps the
  overwrite from coming before that read.
* **Colour rules this design adds.**
  * Delay-slot acceptance by the jump/branch colour.
  * ID waiting for the jump redirect's acknowledge.
  * ID holding the delay slot until the branch's acknowledge.
  * Branch priority in the arbiter.
  * JR and JALR decided in EXE. The source names only conditional branches
    (EXE) and unconditional jumps (ID).
* **Sizes the source does not give.** Prefetch depth 4. Memories of 1024
  words each, with the address taken modulo the size.
* **Not built.**
  * The system coprocessor (exception registers, MMU registers) and the
    64-entry TLB of the R3000 that the source starts from. The asynchronous
    design explicitly leaves exceptions out.
  * The source reports no performance workloads, so none are modelled.

## Simulating

Everything is plain SystemVerilog; Verilator 5 runs every testbench. From
the directory holding `rtl/` and `tb/`:

```sh
verilator --binary --timing -Wno-fatal rtl/mips_pkg.sv \
    $(ls rtl/*.sv | grep -v mips_pkg) tb/tb_async_mips.sv \
    --top-module tb_async_mips -Mdir obj && ./obj/Vtb_async_mips
```

Replace `tb_async_mips` with any other testbench. Each prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog.

| testbench | what it exercises |
|---|---|
| `tb_async_mips` | whole core at default parameters |
| `tb_dhdt`, `tb_reg_bank` | hazard classes, waiting for write-back, index-matched cleaning, the four-instruction limit |
| `tb_fw_unit`, `tb_exe_stage` | forward selection, load-use waiting, ALU and mul/div results, branch targets, link values, colour flips |
| `tb_id_stage` | discarding, jumps, delay slots and colour updates against a randomly acknowledging EXE |
| `tb_fetch_unit`, `tb_redirect_arbiter` | prefetching, redirects with in-flight stale fetches, arbitration order |
| `tb_mem_stage`, `tb_dmem`, `tb_imem` | sized loads and stores with random stalls |
| `tb_wb_stage` | result selection and RegWrite |
| `tb_alu`, `tb_muldiv`, `tb_decode_unit` | against independent models or encoding tables |
| `tb_mips_pkg` | channel payload widths, opcode values, sign extension |

`tb_async_mips` works as follows:

* It runs a directed program and 24 random programs. The programs contain
  forward dependences, loads, stores of every size, multiply, short
  branches with delay slots, and jumps.
* Memory stalls are random.
* It compares every register and the data memory with an instruction-set
  model inside the testbench.
* It counts the mechanisms: forwards from EX and from MEM, EXE waiting for a
  forward, the bank waiting for write-back, discarded instructions, kept
  delay slots, taken branches and jumps. A failure is counted if one never
  happens. The four-instruction limit is the exception: it is only
  printed, because in the full pipeline it is rarely reached.
* It takes about 10 seconds.

The top's status outputs (`id_colour`, `ex_colour` and the `*_evt` pulses)
exist so that these events can be watched without reaching into the
hierarchy.

With Yosys, the top synthesizes to roughly 840 cells and 2250 flip-flops,
plus the two 32-kbit memories.
