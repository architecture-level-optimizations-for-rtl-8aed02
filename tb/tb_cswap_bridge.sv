// tb_cswap_bridge: self-checking testbench of the CSWAP bridge.
// Loads a random 64-bit scalar, walks the key-bit pointer from the top bit down with
// KEY_INIT / KEY_NEXT, and at every bit checks the routing of random operand words
// under the straight, CS0 and CS1 modes against the CS0/CS1 definitions, using the
// scalar bit the testbench itself tracks.
module tb_cswap_bridge;
  import khecc_pkg::*;
  localparam int unsigned W = 34;
  localparam int unsigned M = 64;

  logic clk = 0, rst_n = 0;
  logic key_load = 0, key_op = 0;
  logic [M-1:0] key_in = 0;
  logic [1:0] key_mode = 0, cs_mode = 0;
  logic [W-1:0] a_in, b_in, c_in, d_in, m0_a, m0_b, m1_a, m1_b;
  int checks = 0, failures = 0;
  int n_k0 = 0, n_k1 = 0;

  cswap_bridge #(.W(W), .SCALAR_BITS(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_routes(input logic k);
    logic [W-1:0] e0a, e0b, e1a, e1b;
    for (int md = 0; md < 3; md++) begin
      a_in = W'({$urandom, $urandom}); b_in = W'({$urandom, $urandom});
      c_in = W'({$urandom, $urandom}); d_in = W'({$urandom, $urandom});
      cs_mode = 2'(md);
      if (md == MD_CS0)      {e0a, e0b, e1a, e1b} = k ? {c_in, d_in, a_in, d_in} : {a_in, b_in, c_in, b_in};
      else if (md == MD_CS1) {e0a, e0b, e1a, e1b} = k ? {c_in, d_in, a_in, b_in} : {a_in, b_in, c_in, d_in};
      else                   {e0a, e0b, e1a, e1b} = {a_in, b_in, c_in, d_in};
      #1;
      checks++;
      if ({m0_a, m0_b, m1_a, m1_b} !== {e0a, e0b, e1a, e1b}) begin
        failures++; $display("FAIL k=%0b mode=%0d got %h %h %h %h exp %h %h %h %h", k, md, m0_a, m0_b, m1_a, m1_b, e0a, e0b, e1a, e1b);
      end
    end
  endtask

  logic [M-1:0] key;

  initial begin
    key = {$urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    key_in = key; key_load = 1; @(negedge clk); key_load = 0;
    // Walk the pointer twice to check that KEY_INIT rewinds it.
    for (int pass = 0; pass < 2; pass++) begin
      key_op = 1; key_mode = MD_KEY_INIT; @(negedge clk); key_op = 0;
      for (int i = M - 1; i >= 0; i--) begin
        check_routes(key[i]);
        if (key[i]) n_k1++; else n_k0++;
        key_op = 1; key_mode = MD_KEY_NEXT; @(negedge clk); key_op = 0;
      end
    end
    checks++;
    if (n_k0 == 0 || n_k1 == 0) begin failures++; $display("FAIL key not mixed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
