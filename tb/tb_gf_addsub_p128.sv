// tb_gf_addsub_p128: the tb_gf_addsub test run with the generic 128-bit prime P = 2^128 - 159,
// which stresses the widest intermediate values.
// tb_gf_addsub: self-checking testbench of the AddSub unit.
// Streams random and boundary operands word by word (W = 34, four words each),
// checks a + b mod P and a - b mod P against a wide-integer reference, checks that
// the result is valid exactly one cycle after the last word and that can_accept drops
// while a result is held.
module tb_gf_addsub_p128;
  import khecc_pkg::*;
  localparam int unsigned W = 34;
  localparam int unsigned S = ELEM_BITS / W;
  localparam logic [FIELD_BITS-1:0] P = 128'hFFFF_FFFF_FFFF_FFFF_FFFF_FFFF_FFFF_FF61;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0, pop = 0;
  logic [1:0] in_mode = 0;
  logic [W-1:0] in_a = 0, in_b = 0;
  logic can_accept, res_valid;
  logic [ELEM_BITS-1:0] result;
  int checks = 0, failures = 0;

  gf_addsub #(.W(W), .P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [FIELD_BITS-1:0] rnd();
    logic [FIELD_BITS-1:0] v;
    v = {$urandom, $urandom, $urandom, $urandom};
    return v % P;
  endfunction

  task automatic run(input logic [FIELD_BITS-1:0] a, input logic [FIELD_BITS-1:0] b,
                     input logic [1:0] md);
    logic [ELEM_BITS-1:0] ea, eb;
    logic [FIELD_BITS+1:0] exp_v;
    ea = ELEM_BITS'(a);
    eb = ELEM_BITS'(b);
    if (md == MD_ADD) exp_v = ({2'b0, a} + {2'b0, b}) % {2'b0, P};
    else              exp_v = ({2'b0, a} + {2'b0, P} - {2'b0, b}) % {2'b0, P};
    checks++;
    if (!can_accept) begin failures++; $display("FAIL not ready"); end
    for (int j = 0; j < S; j++) begin
      in_valid <= 1; in_last <= (j == S - 1); in_mode <= md;
      in_a <= ea[j*W +: W]; in_b <= eb[j*W +: W];
      @(posedge clk);
    end
    in_valid <= 0; in_last <= 0;
    #1;
    checks++;
    if (!res_valid || can_accept) begin
      failures++; $display("FAIL latency/accept: valid=%0b accept=%0b", res_valid, can_accept);
    end
    checks++;
    if (result !== ELEM_BITS'(exp_v)) begin
      failures++; $display("FAIL md=%0d a=%h b=%h got=%h exp=%h", md, a, b, result, exp_v);
    end
    pop <= 1; @(posedge clk); pop <= 0; #1;
    checks++;
    if (res_valid) begin failures++; $display("FAIL pop"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(P - 1, P - 1, MD_ADD);
    run(P - 1, 1, MD_ADD);
    run(0, 0, MD_SUB);
    run(0, 1, MD_SUB);
    run(5, P - 1, MD_SUB);
    for (int i = 0; i < 200; i++) run(rnd(), rnd(), 2'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
