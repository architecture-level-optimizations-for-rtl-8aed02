// data_mux: the Data MUX of a cluster.
//
// Selects the result of one arithmetic unit (by the instruction's unit index) and,
// of that 136-bit result, the W-bit word given by word_idx, and drives it onto the
// memory write bus. Purely combinational: the word appears in the same cycle as the
// select. NUNITS results are connected; unit index i selects res[i], any other index
// selects zero. The unit numbering is this design's own.
module data_mux
  import khecc_pkg::*;
#(
  parameter int unsigned W      = 34,
  parameter int unsigned NUNITS = 2,
  parameter int unsigned S      = ELEM_BITS / W,
  parameter int unsigned SIW    = (S > 1) ? $clog2(S) : 1
) (
  input  logic [ELEM_BITS-1:0] res [NUNITS],
  input  logic [2:0]           unit_sel,
  input  logic [SIW-1:0]       word_idx,
  output logic [W-1:0]         wdata
);

  logic [ELEM_BITS-1:0] sel;

  always_comb begin
    sel = '0;
    for (int u = 0; u < NUNITS; u++)
      if (unit_sel == 3'(u)) sel = res[u];
    wdata = W'(sel >> (W * word_idx));
  end

endmodule
