// gf_addsub: modular adder/subtracter of the accelerator (the AddSub unit).
//
// Computes a + b mod P (mode 0) or a - b mod P (mode 1) on fully reduced 128-bit
// field elements. Operands arrive word-serially over the W-bit interconnect, least
// significant word first, S = 136/W words per operand, one word of each operand per
// cycle (in_valid), in_last marking the final word. The result register is loaded on
// the clock edge that takes the last word, so res_valid rises one cycle after in_last.
// The result stays until the controller pops it (pop), and a new operand transfer may
// only start while no result is held or about to be (can_accept).
//
// The unit's function (modular add/sub on the interconnect) follows the published
// architecture; its insides are not published, so the single-cycle full-width add with
// one conditional correction is this design's own choice.
module gf_addsub
  import khecc_pkg::*;
#(
  parameter int unsigned W = 34,
  parameter logic [FIELD_BITS-1:0] P = P_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_last,
  input  logic [1:0]           in_mode,
  input  logic [W-1:0]         in_a,
  input  logic [W-1:0]         in_b,
  output logic                 can_accept,
  output logic                 res_valid,
  output logic [ELEM_BITS-1:0] result,
  input  logic                 pop
);

  logic [ELEM_BITS-1:0] sh_a, sh_b, full_a, full_b;
  logic [FIELD_BITS:0]  sum, sum_red, dif;
  logic [FIELD_BITS-1:0] dif_cor;
  logic [FIELD_BITS-1:0] res_c;

  // Operand shift registers: each word enters at the top and moves down by W.
  assign full_a = (sh_a >> W) | (ELEM_BITS'(in_a) << (ELEM_BITS - W));
  assign full_b = (sh_b >> W) | (ELEM_BITS'(in_b) << (ELEM_BITS - W));

  always_comb begin
    sum     = {1'b0, full_a[FIELD_BITS-1:0]} + {1'b0, full_b[FIELD_BITS-1:0]};
    sum_red = sum - {1'b0, P};
    dif     = {1'b0, full_a[FIELD_BITS-1:0]} - {1'b0, full_b[FIELD_BITS-1:0]};
    dif_cor = dif[FIELD_BITS-1:0] + P;
    if (in_mode == MD_SUB) res_c = dif[FIELD_BITS] ? dif_cor : dif[FIELD_BITS-1:0];
    else                   res_c = sum_red[FIELD_BITS] ? sum[FIELD_BITS-1:0] : sum_red[FIELD_BITS-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_a      <= '0;
      sh_b      <= '0;
      result    <= '0;
      res_valid <= 1'b0;
    end else begin
      if (in_valid) begin
        sh_a <= full_a;
        sh_b <= full_b;
      end
      if (in_valid && in_last) begin
        result    <= ELEM_BITS'(res_c);
        res_valid <= 1'b1;
      end else if (pop) begin
        res_valid <= 1'b0;
      end
    end
  end

  // A transfer finishing in this cycle counts as occupying the unit.
  assign can_accept = !res_valid && !(in_valid && in_last);

  // A transfer must not start while an unread result is held.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_last) |-> !res_valid);

endmodule
