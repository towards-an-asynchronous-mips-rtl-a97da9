// fw_unit: the forwarding unit at the ALU inputs of the EXE stage.
//
// It keeps a buffer of forwarded results with one entry per instruction
// index (4 entries, matching the 2-bit Index of the hazard table).  EXE writes
// an entry with its own result when it finishes an instruction (an ALU
// result; for a load, or an instruction writing nothing, it only marks the
// entry empty); MEM writes the entry again with the instruction's final
// result, so loads become available there.  The operand multiplexers then
// follow the 2-bit control that came with each RegPort: FW_REG takes the
// register data, FW_EX the entry of the instruction one before the current
// one, FW_MEM the entry of the instruction two before.  `ready` is low while
// a needed entry is still empty, which is how EXE waits for a forwarded
// result (for instance right after a load).  Because results wait in the
// buffer, MEM never has to meet EXE at a particular moment.  One buffer entry
// per index is this design's choice; the description calls only for "a
// buffer for the forwarded results".  Writes take effect on the clock edge;
// the multiplexers are combinational.
module fw_unit
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  cur_idx,      // index of the instruction in EXE
  input  regport_t    p0,
  input  regport_t    p1,
  output logic [31:0] op_a,
  output logic [31:0] op_b,
  output logic        ready,
  // EXE finishing instruction ex_idx
  input  logic        ex_done,
  input  logic [1:0]  ex_idx,
  input  logic        ex_valid,     // the result is final already (not a load)
  input  logic [31:0] ex_data,
  // MEM finishing an instruction that writes a register
  input  logic        mem_we,
  input  logic [1:0]  mem_idx,
  input  logic [31:0] mem_data
);
  logic [3:0]  valid;
  logic [31:0] data [4];

  function automatic logic [1:0] src(input fw_t fw);
    return (fw == FW_EX) ? cur_idx - 2'd1 : cur_idx - 2'd2;
  endfunction

  logic ok0, ok1;
  always_comb begin
    op_a = (p0.fw == FW_REG) ? p0.data : data[src(p0.fw)];
    op_b = (p1.fw == FW_REG) ? p1.data : data[src(p1.fw)];
    ok0  = (p0.fw == FW_REG) || valid[src(p0.fw)];
    ok1  = (p1.fw == FW_REG) || valid[src(p1.fw)];
    ready = ok0 && ok1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      for (int i = 0; i < 4; i++) data[i] <= '0;
    end else begin
      if (ex_done) begin
        valid[ex_idx] <= ex_valid;
        data[ex_idx]  <= ex_data;
      end
      if (mem_we) begin
        valid[mem_idx] <= 1'b1;
        data[mem_idx]  <= mem_data;
      end
    end
  end

  // The two writers never target the same entry in one cycle.
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
    !(ex_done && mem_we && ex_idx == mem_idx));
endmodule
