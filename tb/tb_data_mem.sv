// tb_data_mem: self-checking testbench of the dual-port data memory.
// Fills the memory through both ports, reads every word back through both ports
// with the one-cycle read latency, and checks read-before-write on a same-cycle
// write, against a testbench copy of the contents.
module tb_data_mem;
  localparam int unsigned W = 34;
  localparam int unsigned DEPTH = 512;
  localparam int unsigned AW = 9;

  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic [W-1:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  data_mem #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    // Port A writes even words, port B odd words, in the same cycles.
    for (int i = 0; i < DEPTH; i += 2) begin
      model[i] = W'({$urandom, $urandom}); model[i+1] = W'({$urandom, $urandom});
      a_en <= 1; a_we <= 1; a_addr <= AW'(i);     a_wdata <= model[i];
      b_en <= 1; b_we <= 1; b_addr <= AW'(i + 1); b_wdata <= model[i+1];
      @(posedge clk);
    end
    a_we <= 0; b_we <= 0;
    for (int i = 0; i < DEPTH; i++) begin
      a_addr <= AW'(i); b_addr <= AW'(DEPTH - 1 - i);
      @(posedge clk); #1;
      checks += 2;
      if (a_rdata !== model[i])           begin failures++; $display("FAIL A %0d", i); end
      if (b_rdata !== model[DEPTH-1-i])   begin failures++; $display("FAIL B %0d", i); end
    end
    // Read-before-write on port A.
    a_we <= 1; a_addr <= 9'd7; a_wdata <= ~model[7];
    @(posedge clk); #1;
    checks++;
    if (a_rdata !== model[7]) begin failures++; $display("FAIL read-before-write"); end
    a_we <= 0; model[7] = ~model[7];
    @(posedge clk); #1;
    checks++;
    if (a_rdata !== model[7]) begin failures++; $display("FAIL written value"); end
    // Disabled port keeps its output.
    a_en <= 0; a_addr <= 9'd8;
    @(posedge clk); #1;
    checks++;
    if (a_rdata !== model[7]) begin failures++; $display("FAIL enable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
