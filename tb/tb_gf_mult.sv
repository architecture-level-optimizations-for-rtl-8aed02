// tb_gf_mult: self-checking testbench of the hyper-threaded Mult unit.
// Issues bursts of three multiplications back to back, so all thread slots are
// occupied, then checks that can_accept is low, that the results come out in issue
// order, that each is fully reduced and satisfies r * 2^136 = a * b (mod P), and
// that a burst of three finishes within 15 cycles of the last operand word.
// The reference works on the congruence, not on the Montgomery algorithm.
module tb_gf_mult;
  import khecc_pkg::*;
  localparam int unsigned W = 34;
  localparam int unsigned S = ELEM_BITS / W;
  localparam logic [FIELD_BITS-1:0] P = P_DEFAULT;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0, pop = 0;
  logic [W-1:0] in_a = 0, in_b = 0;
  logic can_accept, res_valid;
  logic [ELEM_BITS-1:0] result;
  int checks = 0, failures = 0;

  gf_mult #(.W(W), .P(P), .NTHREADS(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [FIELD_BITS-1:0] rnd();
    logic [FIELD_BITS-1:0] v;
    v = {$urandom, $urandom, $urandom, $urandom};
    return v % P;
  endfunction

  task automatic send(input logic [FIELD_BITS-1:0] a, input logic [FIELD_BITS-1:0] b);
    logic [ELEM_BITS-1:0] ea, eb;
    ea = ELEM_BITS'(a);
    eb = ELEM_BITS'(b);
    for (int j = 0; j < S; j++) begin
      in_valid <= 1; in_last <= (j == S - 1);
      in_a <= ea[j*W +: W]; in_b <= eb[j*W +: W];
      @(posedge clk);
    end
    in_valid <= 0; in_last <= 0;
  endtask

  task automatic check(input logic [FIELD_BITS-1:0] a, input logic [FIELD_BITS-1:0] b);
    logic [511:0] lhs, rhs;
    lhs = ({376'b0, result} << 136) % {384'b0, P};
    rhs = ({384'b0, a} * {384'b0, b}) % {384'b0, P};
    checks++;
    if (lhs !== rhs || result >= ELEM_BITS'(P)) begin
      failures++; $display("FAIL a=%h b=%h got=%h", a, b, result);
    end
  endtask

  logic [FIELD_BITS-1:0] qa [3], qb [3];
  int waited;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int burst = 0; burst < 60; burst++) begin
      for (int t = 0; t < 3; t++) begin
        if (burst == 0) begin
          qa[t] = (t == 0) ? P - 1 : (t == 1) ? 0 : 1;
          qb[t] = P - 1;
        end else begin
          qa[t] = rnd(); qb[t] = rnd();
        end
        #1;
        checks++;
        if (!can_accept) begin failures++; $display("FAIL slot not free"); end
        send(qa[t], qb[t]);
      end
      #1;
      checks++;
      if (can_accept) begin failures++; $display("FAIL can_accept with 3 threads busy"); end
      for (int t = 0; t < 3; t++) begin
        waited = 0;
        while (!res_valid) begin @(posedge clk); #1; waited++; end
        if (t == 2) begin
          checks++;
          if (waited > 15) begin failures++; $display("FAIL burst latency %0d", waited); end
        end
        check(qa[t], qb[t]);
        pop <= 1; @(posedge clk); pop <= 0; #1;
      end
      checks++;
      if (!can_accept || res_valid) begin failures++; $display("FAIL not empty"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
