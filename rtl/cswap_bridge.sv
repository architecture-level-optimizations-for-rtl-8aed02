// cswap_bridge: the CSWAP unit of the two-cluster accelerator.
//
// It sits between the two data memories and the two multipliers and is the only
// block that sees the secret scalar. It holds the SCALAR_BITS-bit scalar k and a
// pointer to the current bit k_i (a shift register whose top bit is k_i). The operand
// words read from cluster 0 (A, B) and cluster 1 (C, D) pass through it to the
// multipliers of cluster 0 and cluster 1, re-routed by one of three operations:
//   straight : mult0 <- (A, B), mult1 <- (C, D)
//   CS0      : (A, B, C, B) if k_i = 0, else (C, D, A, D)
//   CS1      : (A, B, C, D) if k_i = 0, else (C, D, A, B)
// CS0 and CS1 are the two swapping operations that replace the conditional swaps of
// the Montgomery ladder in the clustered organisation. The routing is done with
// masks, so its logic and timing do not depend on k_i.
//
// Key management: key_load stores the scalar. A key operation with mode KEY_INIT
// points at the top bit k_(m-1); mode KEY_NEXT steps to the next lower bit. The
// controller issues these without seeing the key. The routing is combinational; the
// key pointer changes on the clock edge after key_op.
//
// The CS0/CS1 definitions and the local key management follow the published
// architecture; the
// encoding of the key operations is this design's own.
module cswap_bridge
  import khecc_pkg::*;
#(
  parameter int unsigned W = 34,
  parameter int unsigned SCALAR_BITS = 256
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   key_load,
  input  logic [SCALAR_BITS-1:0] key_in,
  input  logic                   key_op,
  input  logic [1:0]             key_mode,
  input  logic [1:0]             cs_mode,
  input  logic [W-1:0]           a_in,
  input  logic [W-1:0]           b_in,
  input  logic [W-1:0]           c_in,
  input  logic [W-1:0]           d_in,
  output logic [W-1:0]           m0_a,
  output logic [W-1:0]           m0_b,
  output logic [W-1:0]           m1_a,
  output logic [W-1:0]           m1_b
);

  logic [SCALAR_BITS-1:0] key_reg, key_sh;
  logic [W-1:0]           km;       // all ones when k_i = 1
  logic                   cs0, cs1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_reg <= '0;
      key_sh  <= '0;
    end else if (key_load) begin
      key_reg <= key_in;
      key_sh  <= key_in;
    end else if (key_op) begin
      if (key_mode == MD_KEY_INIT)      key_sh <= key_reg;
      else if (key_mode == MD_KEY_NEXT) key_sh <= key_sh << 1;
    end
  end

  always_comb begin
    km  = {W{key_sh[SCALAR_BITS-1]}};
    cs0 = (cs_mode == MD_CS0);
    cs1 = (cs_mode == MD_CS1);
    // mult0 takes (C, D) when k_i = 1 under CS0 or CS1, else (A, B).
    m0_a = ((cs0 || cs1) ? km : '0) & c_in | ~((cs0 || cs1) ? km : '0) & a_in;
    m0_b = ((cs0 || cs1) ? km : '0) & d_in | ~((cs0 || cs1) ? km : '0) & b_in;
    // mult1: first operand A when k_i = 1 under CS0/CS1, else C.
    m1_a = ((cs0 || cs1) ? km : '0) & a_in | ~((cs0 || cs1) ? km : '0) & c_in;
    // mult1 second operand: CS0 -> B / D, CS1 -> D / B, straight -> D.
    m1_b = cs0 ? (km & d_in | ~km & b_in)
         : cs1 ? (km & b_in | ~km & d_in)
         : d_in;
  end

endmodule
