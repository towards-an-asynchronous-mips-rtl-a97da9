// mem_stage: local control of the MEM stage.
//
// It latches one bundle at a time from EXE into its own register,
// acknowledging EXE at once so that EXE can go on with the next instruction.  A load or store becomes a request
// to the data memory (word address, byte enables, store data replicated into
// the addressed byte lanes); the stage waits for the memory's answer and, for
// a load, picks the addressed byte or half-word and sign- or zero-extends it.
// Any other instruction passes straight through.  When the instruction is
// done the stage hands it to WB and, if it writes a register, writes its
// final result into EXE's forwarding buffer (mf_*), the "forwarded MEM
// result" a later instruction may need.  Little-endian byte numbering is this
// design's choice.  Interfaces (2-phase): em_* from EXE, d_* request and
// dr_* response of the data memory, mw_* to WB.  Timing: a bundle is latched
// one clock after it is seen; a non-memory instruction leaves one clock
// later, a memory instruction one clock after the memory answers.
module mem_stage
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        em_req,
  output logic        em_ack,
  input  ex_mem_t     em_data,
  output logic        d_req,
  input  logic        d_ack,
  output logic [31:0] d_addr,
  output logic        d_wr,
  output logic [3:0]  d_be,
  output logic [31:0] d_wdata,
  input  logic        dr_req,
  output logic        dr_ack,
  input  logic [31:0] dr_rdata,
  output logic        mw_req,
  input  logic        mw_ack,
  output mem_wb_t     mw_data,
  output logic        mf_we,
  output logic [1:0]  mf_idx,
  output logic [31:0] mf_data
);
  typedef enum logic { M_IDLE, M_WAIT } mem_state_t;
  mem_state_t st;
  ex_mem_t    cur;      // the instruction being worked on
  logic       full;

  logic        is_mem, done_now;
  logic [1:0]  bo;
  logic [31:0] ldata, shifted, result;   // shifted[31:16] is never needed

  assign is_mem = cur.mem_rd || cur.mem_wr;
  assign bo     = cur.res[1:0];

  // load extraction from the word the memory returned
  always_comb begin
    shifted = dr_rdata >> {bo, 3'b000};
    unique case (cur.msize)
      MS_BYTE: ldata = cur.mem_uns ? {24'h0, shifted[7:0]}  : {{24{shifted[7]}},  shifted[7:0]};
      MS_HALF: ldata = cur.mem_uns ? {16'h0, shifted[15:0]} : {{16{shifted[15]}}, shifted[15:0]};
      default: ldata = dr_rdata;
    endcase
  end

  assign done_now = (mw_req == mw_ack) && full &&
                    ((st == M_IDLE && !is_mem) || (st == M_WAIT && dr_req != dr_ack));
  assign result   = (st == M_WAIT && cur.mem_rd) ? ldata : cur.res;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= M_IDLE;
      cur     <= '0;
      full    <= 1'b0;
      em_ack  <= 1'b0;
      d_req   <= 1'b0;
      d_addr  <= '0;
      d_wr    <= 1'b0;
      d_be    <= '0;
      d_wdata <= '0;
      dr_ack  <= 1'b0;
      mw_req  <= 1'b0;
      mw_data <= '0;
      mf_we   <= 1'b0;
      mf_idx  <= '0;
      mf_data <= '0;
    end else begin
      mf_we <= 1'b0;
      if (!full && em_req != em_ack) begin
        cur    <= em_data;
        full   <= 1'b1;
        em_ack <= ~em_ack;
      end
      if (st == M_IDLE && full && is_mem && d_req == d_ack) begin
        d_addr <= {cur.res[31:2], 2'b00};
        d_wr   <= cur.mem_wr;
        unique case (cur.msize)
          MS_BYTE: begin d_be <= 4'b0001 << bo;               d_wdata <= {4{cur.sdata[7:0]}};  end
          MS_HALF: begin d_be <= bo[1] ? 4'b1100 : 4'b0011;   d_wdata <= {2{cur.sdata[15:0]}}; end
          default: begin d_be <= 4'b1111;                     d_wdata <= cur.sdata;            end
        endcase
        d_req <= ~d_req;
        st    <= M_WAIT;
      end
      if (done_now) begin
        if (st == M_WAIT) dr_ack <= ~dr_ack;
        mw_data.idx      <= cur.idx;
        mw_data.alu_res  <= cur.res;
        mw_data.mem_data <= ldata;
        mw_data.is_load  <= cur.mem_rd;
        mw_data.we       <= cur.we;
        mw_data.rd       <= cur.rd;
        mw_req           <= ~mw_req;
        full             <= 1'b0;
        mf_we            <= cur.we;
        mf_idx           <= cur.idx;
        mf_data          <= result;
        st               <= M_IDLE;
      end
    end
  end
endmodule
