// tb_prog_mem: self-checking testbench of the program memory.
// Writes random 36-bit instructions to all 512 locations, reads them back with the
// one-cycle read latency and checks that a disabled read holds its output.
module tb_prog_mem;
  import khecc_pkg::*;
  logic clk = 0, rd_en = 0, wr_en = 0;
  logic [8:0] rd_addr = 0, wr_addr = 0;
  logic [INSTR_BITS-1:0] rd_data, wr_data = 0;
  logic [INSTR_BITS-1:0] model [512];
  int checks = 0, failures = 0;

  prog_mem #(.DEPTH(512)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int i = 0; i < 512; i++) begin
      model[i] = INSTR_BITS'({$urandom, $urandom});
      wr_en <= 1; wr_addr <= 9'(i); wr_data <= model[i];
      @(posedge clk);
    end
    wr_en <= 0;
    for (int i = 511; i >= 0; i--) begin
      rd_en <= 1; rd_addr <= 9'(i);
      @(posedge clk); #1;
      checks++;
      if (rd_data !== model[i]) begin failures++; $display("FAIL %0d", i); end
    end
    rd_en <= 0; rd_addr <= 9'd100;
    @(posedge clk); #1;
    checks++;
    if (rd_data !== model[0]) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
