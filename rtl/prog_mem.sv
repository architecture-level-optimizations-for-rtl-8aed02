// prog_mem: program memory holding the accelerator's microcode.
//
// DEPTH (512) instructions of 36 bits, addressed by the 9-bit program counter. The
// controller reads it synchronously (instruction available the cycle after the
// address); a separate write port lets the host load the program while the
// accelerator is idle. The 9-bit address and the 36-bit word width come from the
// published architecture; the loading port is this design's own.
module prog_mem
  import khecc_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rd_en,
  input  logic [AW-1:0]         rd_addr,
  output logic [INSTR_BITS-1:0] rd_data,
  input  logic                  wr_en,
  input  logic [AW-1:0]         wr_addr,
  input  logic [INSTR_BITS-1:0] wr_data
);

  logic [INSTR_BITS-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
