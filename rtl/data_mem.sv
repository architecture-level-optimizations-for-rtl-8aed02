// data_mem: dual-port data memory (the MEM unit), one per cluster.
//
// DEPTH words of W bits; a field element occupies S = 136/W consecutive words,
// least significant word at the lower address. Both ports read and write
// synchronously: a read returns the word in the cycle after en (the old contents on
// a same-address write). At W = 34 the 512 x 34 array is one 512 x 36 block RAM; at
// W = 68 and 136 it is two and four of them side by side, which is how the width
// configurations w34/w68/w136 trade block RAMs for fewer cycles per memory access.
// The 9-bit addresses come from the instruction format; the read latency and the
// collision behaviour are this design's own choices.
module data_mem #(
  parameter int unsigned W     = 34,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end

endmodule
