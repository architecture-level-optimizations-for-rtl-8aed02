// tb_khecc_ctrl: self-checking testbench of the controller.
// Runs a small program from a testbench program memory (one-cycle read latency):
// a loop of three iterations, each reading two AddSub operands, writing the result
// and stepping the CSWAP key pointer, then a wait, a nop, a jump over an instruction
// that must not execute, and end. A testbench AddSub model delays its result by
// D = 6 cycles, so each write stalls D + 1 cycles. Checks the memory address sequences, the
// operand-stream framing, the pops, the key operations, the stall count (3 x (D + 1)), the
// total cycle count and done.
module tb_khecc_ctrl;
  import khecc_pkg::*;
  localparam int unsigned W = 34;
  localparam int unsigned S = 4;
  localparam int D = 6;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, prog_en;
  logic [8:0] prog_addr;
  logic [INSTR_BITS-1:0] prog_rdata;
  logic mem_a_en, mem_a_we, mem_b_en;
  logic [8:0] mem_a_addr, mem_b_addr;
  logic op_valid, op_last;
  unit_e op_unit, wr_unit;
  logic [1:0] op_mode, key_mode;
  logic [1:0] wr_word;
  logic pop_addsub, pop_mult, key_op;
  logic addsub_can_accept, mult_can_accept, addsub_res_valid, mult_res_valid;
  logic [31:0] cycles, stall_cycles;
  int checks = 0, failures = 0;

  khecc_ctrl #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [INSTR_BITS-1:0] ins(opcode_e op, unit_e u, logic [1:0] md,
      int a1, int a2, int imm);
    instr_t i;
    i.op = op; i.unit = u; i.mode = md;
    i.addr1 = 9'(a1); i.addr2 = 9'(a2); i.imm = 9'(imm);
    return INSTR_BITS'(i);
  endfunction

  logic [INSTR_BITS-1:0] prog [16];
  always_ff @(posedge clk) if (prog_en) prog_rdata <= prog[prog_addr[3:0]];

  // AddSub model: result ready D cycles after the last operand word.
  logic pending;
  int dly;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending <= 0; dly <= 0;
    end else if (op_valid && op_last && op_unit == U_ADDSUB) begin
      pending <= 1; dly <= D;
    end else begin
      if (dly > 0) dly <= dly - 1;
      if (pop_addsub) pending <= 0;
    end
  end
  assign addsub_can_accept = !pending;
  assign addsub_res_valid  = pending && dly == 0;
  assign mult_can_accept   = 1'b1;
  assign mult_res_valid    = 1'b1;

  // Observers
  int n_rd_words = 0, n_rd_last = 0, n_wr_words = 0, n_pops = 0, n_key = 0, n_mult = 0;
  int rd_idx = 0, wr_idx = 0;
  always @(posedge clk) if (rst_n) begin
    if (mem_a_en && !mem_a_we) begin
      if (!mem_b_en || mem_a_addr !== 9'(4 + rd_idx % S) || mem_b_addr !== 9'(8 + rd_idx % S)) begin
        failures++; $display("FAIL read address %0d/%0d", mem_a_addr, mem_b_addr);
      end
      checks++; rd_idx++;
    end
    if (mem_a_en && mem_a_we) begin
      if (mem_a_addr !== 9'(12 + wr_idx % S) || wr_word !== 2'(wr_idx % S) || wr_unit != U_ADDSUB) begin
        failures++; $display("FAIL write address %0d", mem_a_addr);
      end
      checks++; wr_idx++; n_wr_words++;
    end
    if (op_valid) begin
      n_rd_words++;
      if (op_mode != MD_SUB) begin failures++; $display("FAIL op mode"); end
    end
    if (op_valid && op_last) n_rd_last++;
    if (op_valid && op_unit == U_MULT) n_mult++;
    if (pop_addsub) n_pops++;
    if (key_op) begin
      n_key++;
      if (key_mode != MD_KEY_NEXT) begin failures++; $display("FAIL key mode"); end
    end
  end

  initial begin
    prog[0]  = ins(OP_JUMP,  U_ADDSUB, MD_LOOP_SET, 0, 0, 3);
    prog[1]  = ins(OP_READ,  U_ADDSUB, MD_SUB,      4, 8, 0);
    prog[2]  = ins(OP_WRITE, U_ADDSUB, 2'd0,       12, 0, 0);
    prog[3]  = ins(OP_READ,  U_CSWAP,  MD_KEY_NEXT, 0, 0, 0);
    prog[4]  = ins(OP_JUMP,  U_ADDSUB, MD_LOOP_DEC, 0, 0, 1);
    prog[5]  = ins(OP_WAIT,  U_ADDSUB, 2'd0,        0, 0, 5);
    prog[6]  = ins(OP_NOP,   U_ADDSUB, 2'd0,        0, 0, 0);
    prog[7]  = ins(OP_JUMP,  U_ADDSUB, MD_JMP,      0, 0, 9);
    prog[8]  = ins(OP_READ,  U_MULT,   2'd0,        0, 0, 0);
    prog[9]  = ins(OP_END,   U_ADDSUB, 2'd0,        0, 0, 0);
    for (int i = 10; i < 16; i++) prog[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    wait (done);
    @(posedge clk); #1;
    checks++;
    if (busy) begin failures++; $display("FAIL busy after end"); end
    checks++;
    if (n_rd_words != 3 * S || n_rd_last != 3 || n_wr_words != 3 * S || n_pops != 3) begin
      failures++;
      $display("FAIL counts rd=%0d last=%0d wr=%0d pops=%0d", n_rd_words, n_rd_last, n_wr_words, n_pops);
    end
    checks++;
    if (n_key != 3 || n_mult != 0) begin failures++; $display("FAIL key=%0d mult=%0d", n_key, n_mult); end
    checks++;
    if (stall_cycles != 32'(3 * (D + 1))) begin failures++; $display("FAIL stalls %0d", stall_cycles); end
    // 1 fetch + 1 loop set + 3 x (S read + S write + D + 1 stall + 1 key + 1 loop)
    // + 5 wait + 1 nop + 1 jump + 1 end
    checks++;
    if (cycles != 32'(2 + 3 * (2 * S + D + 3) + 8)) begin failures++; $display("FAIL cycles %0d", cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
