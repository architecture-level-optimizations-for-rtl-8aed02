// gf_mult: hyper-threaded modular multiplier of the accelerator (the Mult unit).
//
// Computes the Montgomery product a * b * 2^-136 mod P of two fully reduced field
// elements. Up to NTHREADS (3) independent multiplications are in flight at once and
// share one digit datapath: the datapath serves the thread slots in a fixed round-robin
// turn, one slot per cycle. Each product takes NDIGITS (4) Montgomery steps with
// 34-bit digits of b, then one step for the final conditional subtraction, so a
// multiplication finishes 5 turns (at most 15 cycles) after its operands are in.
//
// Interface: operands arrive word-serially like the AddSub unit (in_valid, in_last,
// W-bit words, least significant first). can_accept is high while a slot is free (an operand transfer finishing in the
// same cycle counts as taking one).
// Results leave in issue order: res_valid tells that the oldest multiplication is
// finished, result holds it and pop releases its slot.
//
// Three parallel independent multiplications on 34-bit digits follow the published
// architecture. The Montgomery formulation, the turn order and the in-order
// result queue are this design's own choices.
module gf_mult
  import khecc_pkg::*;
#(
  parameter int unsigned W = 34,
  parameter logic [FIELD_BITS-1:0] P = P_DEFAULT,
  parameter int unsigned NTHREADS = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_last,
  input  logic [W-1:0]         in_a,
  input  logic [W-1:0]         in_b,
  output logic                 can_accept,
  output logic                 res_valid,
  output logic [ELEM_BITS-1:0] result,
  input  logic                 pop
);

  localparam int unsigned TW = $clog2(NTHREADS);
  localparam int unsigned CW = $clog2(NTHREADS + 1);
  localparam int unsigned SW = $clog2(NDIGITS + 2);
  localparam logic [DIGIT-1:0] PINV = mont_pinv(P[DIGIT-1:0]);
  localparam int unsigned XW = ELEM_BITS + DIGIT - 2 + 2;   // 170-bit step width

  logic [ELEM_BITS-1:0] sh_a, sh_b, full_a, full_b;

  logic [FIELD_BITS-1:0] op_a [NTHREADS];
  logic [ELEM_BITS-1:0]  op_b [NTHREADS];
  logic [FIELD_BITS+1:0] acc  [NTHREADS];
  logic [SW-1:0]         step [NTHREADS];
  logic [NTHREADS-1:0]   busy, done;

  logic [TW-1:0] order [NTHREADS];
  logic [TW-1:0] q_rd, q_wr;
  logic [CW-1:0] q_cnt;
  logic [TW-1:0] turn;
  logic [TW-1:0] free_slot;
  logic          free_found;

  assign full_a = (sh_a >> W) | (ELEM_BITS'(in_a) << (ELEM_BITS - W));
  assign full_b = (sh_b >> W) | (ELEM_BITS'(in_b) << (ELEM_BITS - W));

  always_comb begin
    free_slot  = '0;
    free_found = 1'b0;
    for (int t = NTHREADS - 1; t >= 0; t--) begin
      if (!busy[t]) begin
        free_slot  = TW'(t);
        free_found = 1'b1;
      end
    end
  end

  // One Montgomery step for the slot whose turn it is.
  logic [XW-1:0]          t_sum, t_red;
  logic [DIGIT-1:0]       qd;
  logic [FIELD_BITS+1:0]  acc_next;
  logic [FIELD_BITS+2:0]  fin_dif;
  always_comb begin
    t_sum    = XW'(acc[turn]) + XW'(op_a[turn]) * XW'(op_b[turn][DIGIT-1:0]);
    qd       = t_sum[DIGIT-1:0] * PINV;
    t_red    = t_sum + XW'(qd) * XW'(P);
    acc_next = (FIELD_BITS+2)'(t_red >> DIGIT);
    fin_dif  = {1'b0, acc[turn]} - (FIELD_BITS+3)'(P);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_a  <= '0;
      sh_b  <= '0;
      busy  <= '0;
      done  <= '0;
      q_rd  <= '0;
      q_wr  <= '0;
      q_cnt <= '0;
      turn  <= '0;
      for (int t = 0; t < NTHREADS; t++) begin
        op_a[t]  <= '0;
        op_b[t]  <= '0;
        acc[t]   <= '0;
        step[t]  <= '0;
        order[t] <= '0;
      end
    end else begin
      turn <= (turn == TW'(NTHREADS - 1)) ? '0 : turn + 1'b1;

      // Datapath step of the current slot.
      if (busy[turn] && !done[turn]) begin
        if (step[turn] < SW'(NDIGITS)) begin
          acc[turn]  <= acc_next;
          op_b[turn] <= op_b[turn] >> DIGIT;
          step[turn] <= step[turn] + 1'b1;
        end else begin
          if (!fin_dif[FIELD_BITS+2]) acc[turn] <= fin_dif[FIELD_BITS+1:0];
          done[turn] <= 1'b1;
        end
      end

      if (in_valid) begin
        sh_a <= full_a;
        sh_b <= full_b;
      end

      // Result leaves: free its slot.
      if (pop && res_valid) begin
        busy[order[q_rd]] <= 1'b0;
        done[order[q_rd]] <= 1'b0;
        q_rd <= (q_rd == TW'(NTHREADS - 1)) ? '0 : q_rd + 1'b1;
      end

      // Operands complete: start a new thread.
      if (in_valid && in_last) begin
        op_a[free_slot] <= full_a[FIELD_BITS-1:0];
        op_b[free_slot] <= full_b;
        acc[free_slot]  <= '0;
        step[free_slot] <= '0;
        busy[free_slot] <= 1'b1;
        done[free_slot] <= 1'b0;
        order[q_wr]     <= free_slot;
        q_wr <= (q_wr == TW'(NTHREADS - 1)) ? '0 : q_wr + 1'b1;
      end

      q_cnt <= q_cnt + CW'(in_valid && in_last) - CW'(pop && res_valid);
    end
  end

  // A transfer finishing in this cycle already counts as an occupied slot.
  assign can_accept = (int'(q_cnt) + int'(in_valid && in_last)) < int'(NTHREADS);
  assign res_valid  = (q_cnt != '0) && done[order[q_rd]];
  assign result     = ELEM_BITS'(acc[order[q_rd]][FIELD_BITS-1:0]);

  a_slot_free: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_last) |-> free_found);
  a_pop_ready: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> res_valid);

endmodule
