// khecc_ctrl: controller of the accelerator.
//
// Executes the 36-bit instructions held in program memory (see khecc_pkg for the
// format). One controller drives both clusters with the same signals, so the two
// clusters always run the same operation on their own data.
//   read  : for S cycles, reads words addr1+j and addr2+j on the two memory ports
//           of both clusters and streams them (one cycle later, aligned with the
//           memory data) to the selected unit, which starts computing after the last
//           word. A read of the CSWAP unit moves its key-bit pointer instead, in one
//           cycle and with no memory access.
//   write : for S cycles, writes the selected unit's result, word j, to addr1+j on
//           port A of both memories, then releases the result (pop).
//   wait  : idles for imm cycles.     nop : does nothing.
//   jump  : mode 0 jumps to imm; mode 1 loads the loop counter with imm; mode 2
//           decrements the loop counter and jumps to imm while it is not zero.
//   end   : stops and raises done.
// A read of a unit that cannot take operands, or a write of a unit whose result is
// not ready, stalls in place until the unit is ready (stall_cycles counts them).
// The next instruction is prefetched during the last cycle of the current one, so
// nop, jump and key operations take one cycle, read and write take S cycles (one
// per word), wait takes imm cycles (at least one), and a run adds one initial fetch.
//
// The instruction set, the field widths, the one-cycle nop, the S cycles per memory
// operation and the rule that control never sees the key follow the published
// architecture.
// The opcode values, the loop counter behind jump modes 1 and 2 and the stall
// interlock are this design's own choices.
module khecc_ctrl
  import khecc_pkg::*;
#(
  parameter int unsigned W  = 34,
  parameter int unsigned S  = ELEM_BITS / W,
  parameter int unsigned SIW = (S > 1) ? $clog2(S) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  // program memory
  output logic                  prog_en,
  output logic [ADDR_BITS-1:0]  prog_addr,
  input  logic [INSTR_BITS-1:0] prog_rdata,
  // data memories (same for both clusters)
  output logic                  mem_a_en,
  output logic                  mem_a_we,
  output logic [ADDR_BITS-1:0]  mem_a_addr,
  output logic                  mem_b_en,
  output logic [ADDR_BITS-1:0]  mem_b_addr,
  // operand stream to the units, aligned with the memory read data
  output logic                  op_valid,
  output logic                  op_last,
  output unit_e                 op_unit,
  output logic [1:0]            op_mode,
  // result transfer
  output unit_e                 wr_unit,
  output logic [SIW-1:0]        wr_word,
  output logic                  pop_addsub,
  output logic                  pop_mult,
  // key pointer of the CSWAP unit
  output logic                  key_op,
  output logic [1:0]            key_mode,
  // unit status (already combined over both clusters)
  input  logic                  addsub_can_accept,
  input  logic                  mult_can_accept,
  input  logic                  addsub_res_valid,
  input  logic                  mult_res_valid,
  // statistics
  output logic [31:0]           cycles,
  output logic [31:0]           stall_cycles
);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_EXEC, S_READ, S_WRITE, S_WAIT} state_e;

  state_e               state;
  logic [ADDR_BITS-1:0] pc, next_pc;
  instr_t               ir, cur;
  logic [SIW-1:0]       j;
  logic [IMM_BITS-1:0]  wait_cnt, loop_cnt;
  logic                 unit_ok;
  logic                 rd_issue, wr_issue, advance;

  // Instruction being executed: straight from program memory in its first cycle.
  assign cur = (state == S_EXEC) ? instr_t'(prog_rdata) : ir;

  always_comb begin
    unit_ok = 1'b1;
    if (cur.op == OP_READ) begin
      if (cur.unit == U_ADDSUB)    unit_ok = addsub_can_accept;
      else if (cur.unit == U_MULT) unit_ok = mult_can_accept;
    end else if (cur.op == OP_WRITE) begin
      if (cur.unit == U_ADDSUB)    unit_ok = addsub_res_valid;
      else if (cur.unit == U_MULT) unit_ok = mult_res_valid;
    end
  end

  // Word transfers of this cycle and whether the instruction finishes in it.
  always_comb begin
    rd_issue = 1'b0;
    wr_issue = 1'b0;
    advance  = 1'b0;
    next_pc  = pc + 1'b1;
    unique case (state)
      S_EXEC: begin
        unique case (cur.op)
          OP_READ: begin
            if (cur.unit == U_CSWAP) advance = 1'b1;
            else if (unit_ok) begin
              rd_issue = 1'b1;
              advance  = (S == 1);
            end
          end
          OP_WRITE: begin
            if (unit_ok) begin
              wr_issue = 1'b1;
              advance  = (S == 1);
            end
          end
          OP_WAIT: advance = (cur.imm <= 1);
          OP_JUMP: begin
            advance = 1'b1;
            if (cur.mode == MD_JMP) next_pc = cur.imm;
            else if (cur.mode == MD_LOOP_DEC && loop_cnt > 1) next_pc = cur.imm;
          end
          OP_END:  advance = 1'b0;
          default: advance = 1'b1;
        endcase
      end
      S_READ: begin
        rd_issue = 1'b1;
        advance  = (j == SIW'(S - 1));
      end
      S_WRITE: begin
        wr_issue = 1'b1;
        advance  = (j == SIW'(S - 1));
      end
      S_WAIT: advance = (wait_cnt == 1);
      default: advance = 1'b0;
    endcase
  end

  assign busy      = (state != S_IDLE);
  assign prog_en   = (state == S_FETCH) || advance;
  assign prog_addr = (state == S_FETCH) ? pc : next_pc;

  always_comb begin
    mem_a_en   = rd_issue || wr_issue;
    mem_a_we   = wr_issue;
    mem_b_en   = rd_issue;
    mem_a_addr = cur.addr1 + ADDR_BITS'(j);
    mem_b_addr = cur.addr2 + ADDR_BITS'(j);
    wr_unit    = cur.unit;
    wr_word    = j;
    pop_addsub = wr_issue && (j == SIW'(S - 1)) && (cur.unit == U_ADDSUB);
    pop_mult   = wr_issue && (j == SIW'(S - 1)) && (cur.unit == U_MULT);
    key_op     = (state == S_EXEC) && (cur.op == OP_READ) && (cur.unit == U_CSWAP);
    key_mode   = cur.mode;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      pc           <= '0;
      ir           <= '0;
      j            <= '0;
      wait_cnt     <= '0;
      loop_cnt     <= '0;
      done         <= 1'b0;
      op_valid     <= 1'b0;
      op_last      <= 1'b0;
      op_unit      <= U_ADDSUB;
      op_mode      <= '0;
      cycles       <= '0;
      stall_cycles <= '0;
    end else begin
      // Operand stream: the read issue delayed by the memory latency.
      op_valid <= rd_issue;
      op_last  <= rd_issue && (j == SIW'(S - 1));
      op_unit  <= cur.unit;
      op_mode  <= cur.mode;
      if (state != S_IDLE) cycles <= cycles + 1;

      if (advance) begin
        pc    <= next_pc;
        j     <= '0;
        state <= S_EXEC;
      end

      unique case (state)
        S_IDLE: begin
          if (start) begin
            pc           <= '0;
            done         <= 1'b0;
            cycles       <= '0;
            stall_cycles <= '0;
            state        <= S_FETCH;
          end
        end
        S_FETCH: state <= S_EXEC;
        S_EXEC: begin
          ir <= cur;
          unique case (cur.op)
            OP_READ, OP_WRITE: begin
              if (cur.unit != U_CSWAP || cur.op == OP_WRITE) begin
                if (!unit_ok) stall_cycles <= stall_cycles + 1;
                else if (S > 1) begin
                  j     <= SIW'(1);
                  state <= (cur.op == OP_READ) ? S_READ : S_WRITE;
                end
              end
            end
            OP_WAIT: begin
              if (cur.imm > 1) begin
                wait_cnt <= cur.imm - 1'b1;
                state    <= S_WAIT;
              end
            end
            OP_JUMP: begin
              if (cur.mode == MD_LOOP_SET)      loop_cnt <= cur.imm;
              else if (cur.mode == MD_LOOP_DEC) loop_cnt <= loop_cnt - 1'b1;
            end
            OP_END: begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
            default: ;
          endcase
        end
        S_READ, S_WRITE: if (!advance) j <= j + 1'b1;
        S_WAIT: wait_cnt <= wait_cnt - 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
