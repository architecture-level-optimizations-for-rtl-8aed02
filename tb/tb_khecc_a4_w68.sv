// tb_khecc_a4_w68: end-to-end testbench of the clustered accelerator in the
// w68 width configuration (W = 68, S = 2 word(s) per element), otherwise as
// tb_khecc_a4_top (256-bit scalar, P = 2^127 - 1).
//
// The testbench generates the microcode of a Montgomery-ladder scalar multiplication
// in which every ladder step is the clustered xDBLADD: both clusters compute a
// Hadamard transform H, a product with constants E1, a product routed by CS0, a
// second H, a product with constants E2 (the doubling constants in cluster 0, the
// difference-point constants in cluster 1) and a product routed by CS1, after which
// cluster 0 holds V1 and cluster 1 holds V2 again. Products are issued three at a
// time so that all multiplier threads are busy, and each result write waits on the
// interlock. Random field elements stand in for the curve constants, so the check
// is of the data path and its key-dependent routing, not of curve arithmetic.
//
// The testbench loads program, scalar, points and constants through the host
// ports, runs the ladder, reads both points back and compares them with a
// wide-integer model of the same ladder (Montgomery product a*b*2^-136 mod P,
// computed as a*b*2^118 mod P for P = 2^127 - 1). It also checks the cycle count
// against the sum of the instruction timings plus the reported stalls, and counts
// how often each mechanism happened: write stalls, all three threads busy, CS0/CS1
// with k_i = 0 and with k_i = 1, taken loop jumps, wait cycles, add and subtract.
module tb_khecc_a4_w68;
  import khecc_pkg::*;
  localparam int unsigned W = 68;
  localparam int unsigned S = ELEM_BITS / W;
  localparam int unsigned M = 256;
  localparam logic [FIELD_BITS-1:0] P = P_DEFAULT;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  logic prog_we = 0;
  logic [8:0] prog_addr = 0;
  logic [INSTR_BITS-1:0] prog_wdata = 0;
  logic key_load = 0;
  logic [M-1:0] key_in = 0;
  logic host_en = 0, host_we = 0, host_cluster = 0;
  logic [8:0] host_addr = 0;
  logic [W-1:0] host_wdata = 0, host_rdata;
  logic [31:0] cycles, stall_cycles;
  int checks = 0, failures = 0;

  khecc_a4_top #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- memory map (element slots, word address = slot * S)
  localparam int X = 0, U = 4, UP = 8, WV = 12, Y = 16, YP = 20, E1 = 24, E2 = 28, T = 32;

  // ---------------- program generation
  logic [INSTR_BITS-1:0] prog [512];
  int plen = 0;
  longint base_loop = 0, base_once = 1;   // fixed cycle cost: initial fetch + instructions
  int n_add = 0, n_sub = 0;

  function automatic int cost(opcode_e op, unit_e u, int imm);
    if (op == OP_READ && u != U_CSWAP) return S;
    if (op == OP_WRITE) return S;
    if (op == OP_WAIT) return (imm > 1) ? imm : 1;
    return 1;
  endfunction

  task automatic emit(input bit in_loop, input opcode_e op, input unit_e u, input logic [1:0] md,
                      input int a1, input int a2, input int imm);
    instr_t i;
    i.op = op; i.unit = u; i.mode = md;
    i.addr1 = 9'(a1 * S); i.addr2 = 9'(a2 * S); i.imm = 9'(imm);
    prog[plen] = INSTR_BITS'(i);
    plen++;
    if (in_loop) base_loop += longint'(cost(op, u, imm)); else base_once += longint'(cost(op, u, imm));
  endtask

  task automatic emit_as(input logic [1:0] md, input int dst, input int a, input int b);
    emit(1, OP_READ, U_ADDSUB, md, a, b, 0);
    emit(1, OP_WRITE, U_ADDSUB, 2'd0, dst, 0, 0);
  endtask

  // Hadamard transform of slots src..src+3 into dst..dst+3 (through T).
  task automatic emit_h(input int dst, input int src);
    emit_as(MD_ADD, T + 0, src + 0, src + 1);
    emit_as(MD_SUB, T + 1, src + 0, src + 1);
    emit_as(MD_ADD, T + 2, src + 2, src + 3);
    emit_as(MD_SUB, T + 3, src + 2, src + 3);
    emit_as(MD_ADD, dst + 0, T + 0, T + 2);
    emit_as(MD_SUB, dst + 1, T + 0, T + 2);
    emit_as(MD_ADD, dst + 2, T + 1, T + 3);
    emit_as(MD_SUB, dst + 3, T + 1, T + 3);
  endtask

  // Four products dst_j = a_j * b_j, three threads in flight.
  task automatic emit_m4(input logic [1:0] md, input int dst, input int a, input int b);
    for (int j = 0; j < 3; j++) emit(1, OP_READ, U_MULT, md, a + j, b + j, 0);
    emit(1, OP_WRITE, U_MULT, 2'd0, dst + 0, 0, 0);
    emit(1, OP_READ, U_MULT, md, a + 3, b + 3, 0);
    for (int j = 1; j < 4; j++) emit(1, OP_WRITE, U_MULT, 2'd0, dst + j, 0, 0);
  endtask

  task automatic build_program();
    int loop_top;
    emit(0, OP_READ, U_CSWAP, MD_KEY_INIT, 0, 0, 0);
    emit(0, OP_WAIT, U_ADDSUB, 2'd0, 0, 0, 3);
    emit(0, OP_JUMP, U_ADDSUB, MD_LOOP_SET, 0, 0, M);
    loop_top = plen;
    emit_h(U, X);
    emit_m4(MD_STRAIGHT, UP, U, E1);
    emit_m4(MD_CS0, WV, UP, U);
    emit_h(Y, WV);
    emit_m4(MD_STRAIGHT, YP, Y, E2);
    emit_m4(MD_CS1, X, YP, Y);
    emit(1, OP_READ, U_CSWAP, MD_KEY_NEXT, 0, 0, 0);
    emit(1, OP_JUMP, U_ADDSUB, MD_LOOP_DEC, 0, 0, loop_top);
    emit(0, OP_NOP, U_ADDSUB, 2'd0, 0, 0, 0);
    emit(0, OP_END, U_ADDSUB, 2'd0, 0, 0, 0);
  endtask

  // ---------------- reference model
  typedef logic [FIELD_BITS-1:0] fe_t;
  typedef fe_t pt_t [4];

  function automatic fe_t fadd(fe_t a, fe_t b);
    return fe_t'(({1'b0, a} + {1'b0, b}) % {1'b0, P});
  endfunction
  function automatic fe_t fsub(fe_t a, fe_t b);
    return fe_t'(({1'b0, a} + {1'b0, P} - {1'b0, b}) % {1'b0, P});
  endfunction
  function automatic fe_t mm(fe_t a, fe_t b);
    logic [383:0] t;
    t = ({256'b0, a} * {256'b0, b}) % {256'b0, P};
    t = (t * (384'(1) << 118)) % {256'b0, P};
    return fe_t'(t);
  endfunction
  function automatic pt_t had(pt_t x);
    pt_t t, r;
    t[0] = fadd(x[0], x[1]); t[1] = fsub(x[0], x[1]);
    t[2] = fadd(x[2], x[3]); t[3] = fsub(x[2], x[3]);
    r[0] = fadd(t[0], t[2]); r[1] = fsub(t[0], t[2]);
    r[2] = fadd(t[1], t[3]); r[3] = fsub(t[1], t[3]);
    return r;
  endfunction

  function automatic fe_t rnd();
    fe_t v;
    v = {$urandom, $urandom, $urandom, $urandom};
    return v % P;
  endfunction

  // ---------------- host access
  task automatic host_write(input bit cl, input int slot, input fe_t v);
    logic [ELEM_BITS-1:0] e;
    e = ELEM_BITS'(v);
    for (int j = 0; j < S; j++) begin
      host_en = 1; host_we = 1; host_cluster = cl;
      host_addr = 9'(slot * S + j); host_wdata = e[j*W +: W];
      @(negedge clk);
    end
    host_en = 0; host_we = 0;
  endtask

  task automatic host_read(input bit cl, input int slot, output fe_t v);
    logic [ELEM_BITS-1:0] e;
    for (int j = 0; j < S; j++) begin
      host_en = 1; host_we = 0; host_cluster = cl; host_addr = 9'(slot * S + j);
      @(negedge clk);
      e[j*W +: W] = host_rdata;
    end
    host_en = 0;
    v = e[FIELD_BITS-1:0];
  endtask

  // ---------------- mechanism counters
  int n_full = 0, n_wait = 0, n_key_ops = 0, n_loop_taken = 0;
  int n_cs0_k0 = 0, n_cs0_k1 = 0, n_cs1_k0 = 0, n_cs1_k1 = 0;
  always @(posedge clk) if (rst_n && busy) begin
    if (!dut.mu_acc[0]) n_full++;
    if (int'(dut.u_ctrl.state) == 5) n_wait++;
    if (dut.key_op) n_key_ops++;
    if (int'(dut.u_ctrl.state) == 2 && dut.u_ctrl.cur.op == OP_JUMP &&
        dut.u_ctrl.cur.mode == MD_LOOP_DEC && dut.u_ctrl.loop_cnt > 1) n_loop_taken++;
    if (dut.op_valid && dut.op_last && dut.op_unit == U_MULT) begin
      if (dut.op_mode == MD_CS0) begin
        if (dut.u_cswap.key_sh[M-1]) n_cs0_k1++; else n_cs0_k0++;
      end
      if (dut.op_mode == MD_CS1) begin
        if (dut.u_cswap.key_sh[M-1]) n_cs1_k1++; else n_cs1_k0++;
      end
    end
    if (dut.op_valid && dut.op_last && dut.op_unit == U_ADDSUB) begin
      if (dut.op_mode == MD_ADD) n_add++; else n_sub++;
    end
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  // ---------------- main
  pt_t v1, v2, e1, e2a, e2b, pu, pv, pup, pvp, w0, w1, y0, y1, y0p, y1p;
  logic [M-1:0] key;
  fe_t got;
  longint expect_cycles;

  initial begin
    key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    for (int j = 0; j < 4; j++) begin
      v1[j] = rnd(); v2[j] = rnd(); e1[j] = rnd(); e2a[j] = rnd(); e2b[j] = rnd();
    end
    build_program();

    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < plen; i++) begin
      prog_we = 1; prog_addr = 9'(i); prog_wdata = prog[i];
      @(negedge clk);
    end
    prog_we = 0;
    key_in = key; key_load = 1; @(negedge clk); key_load = 0;
    for (int j = 0; j < 4; j++) begin
      host_write(0, X + j, v1[j]);  host_write(1, X + j, v2[j]);
      host_write(0, E1 + j, e1[j]); host_write(1, E1 + j, e1[j]);
      host_write(0, E2 + j, e2a[j]); host_write(1, E2 + j, e2b[j]);
    end

    // Reference ladder.
    for (int i = M - 1; i >= 0; i--) begin
      pu = had(v1); pv = had(v2);
      for (int j = 0; j < 4; j++) begin pup[j] = mm(pu[j], e1[j]); pvp[j] = mm(pv[j], e1[j]); end
      for (int j = 0; j < 4; j++) begin
        if (!key[i]) begin w0[j] = mm(pup[j], pu[j]); w1[j] = mm(pvp[j], pu[j]); end
        else         begin w0[j] = mm(pvp[j], pv[j]); w1[j] = mm(pup[j], pv[j]); end
      end
      y0 = had(w0); y1 = had(w1);
      for (int j = 0; j < 4; j++) begin y0p[j] = mm(y0[j], e2a[j]); y1p[j] = mm(y1[j], e2b[j]); end
      for (int j = 0; j < 4; j++) begin
        if (!key[i]) begin v1[j] = mm(y0p[j], y0[j]); v2[j] = mm(y1p[j], y1[j]); end
        else         begin v1[j] = mm(y1p[j], y1[j]); v2[j] = mm(y0p[j], y0[j]); end
      end
    end

    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);

    for (int j = 0; j < 4; j++) begin
      host_read(0, X + j, got);
      checks++;
      if (got !== v1[j]) begin failures++; $display("FAIL V1[%0d] got %h exp %h", j, got, v1[j]); end
      host_read(1, X + j, got);
      checks++;
      if (got !== v2[j]) begin failures++; $display("FAIL V2[%0d] got %h exp %h", j, got, v2[j]); end
    end

    expect_cycles = base_once + longint'(M) * base_loop + longint'(stall_cycles);
    checks++;
    if (longint'(cycles) != expect_cycles) begin
      failures++; $display("FAIL cycles %0d expected %0d", cycles, expect_cycles);
    end
    $display("scalar multiplication: %0d-bit scalar, %0d instructions, %0d cycles, %0d stall cycles",
             M, plen, cycles, stall_cycles);
    need("write stall cycles", int'(stall_cycles));
    need("cycles with 3 threads busy", n_full);
    need("CS0 with k_i = 0", n_cs0_k0);
    need("CS0 with k_i = 1", n_cs0_k1);
    need("CS1 with k_i = 0", n_cs1_k0);
    need("CS1 with k_i = 1", n_cs1_k1);
    need("loop jumps taken", n_loop_taken);
    need("wait cycles", n_wait);
    need("additions", n_add);
    need("subtractions", n_sub);
    checks++;
    if (n_key_ops != M + 1 || n_loop_taken != M - 1) begin
      failures++; $display("FAIL key ops %0d loop jumps %0d", n_key_ops, n_loop_taken);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
