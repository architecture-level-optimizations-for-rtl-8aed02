// khecc_a4_top: Kummer-HECC scalar-multiplication accelerator, clustered (A4)
// organisation.
//
// Two symmetric clusters each hold a dual-port data memory, an AddSub unit, a
// hyper-threaded Mult unit and a Data MUX. One controller, running microcode from the
// program memory, drives both clusters with identical signals, so each instruction
// runs on both clusters at once: cluster 0 works on one ladder point and cluster 1 on
// the other. The CSWAP unit is the bridge between the clusters: the operand words
// read for the multipliers pass through it, and under the CS0/CS1 modes it exchanges
// them between the clusters according to the current scalar bit, which only it holds.
//
// Host side (idle accelerator): prog_we/prog_addr/prog_wdata load the program;
// key_load/key_in load the scalar; host_* reads and writes either data memory through
// its port B (host_rdata is valid the cycle after a read). start runs the program
// from address 0; busy is high until the end instruction, when done rises.
// cycles/stall_cycles report the length of the last run and how many of its cycles
// were interlock stalls.
//
// The cluster organisation, the units per cluster and the CSWAP bridge follow the
// published clustered (A4) architecture; the host ports are this design's own.
module khecc_a4_top
  import khecc_pkg::*;
#(
  parameter int unsigned W           = 34,
  parameter logic [FIELD_BITS-1:0] P = P_DEFAULT,
  parameter int unsigned SCALAR_BITS = 256,
  parameter int unsigned NTHREADS    = 3,
  parameter int unsigned MEM_DEPTH   = 512,
  parameter int unsigned PROG_DEPTH  = 512
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  input  logic                   prog_we,
  input  logic [ADDR_BITS-1:0]   prog_addr,
  input  logic [INSTR_BITS-1:0]  prog_wdata,
  input  logic                   key_load,
  input  logic [SCALAR_BITS-1:0] key_in,
  input  logic                   host_en,
  input  logic                   host_we,
  input  logic                   host_cluster,
  input  logic [ADDR_BITS-1:0]   host_addr,
  input  logic [W-1:0]           host_wdata,
  output logic [W-1:0]           host_rdata,
  output logic [31:0]            cycles,
  output logic [31:0]            stall_cycles
);

  localparam int unsigned S   = ELEM_BITS / W;
  localparam int unsigned SIW = (S > 1) ? $clog2(S) : 1;
  localparam int unsigned MAW = $clog2(MEM_DEPTH);

  // Controller outputs
  logic                  prog_en;
  logic [ADDR_BITS-1:0]  prog_raddr;
  logic [INSTR_BITS-1:0] prog_rdata;
  logic                  mem_a_en, mem_a_we, mem_b_en;
  logic [ADDR_BITS-1:0]  mem_a_addr, mem_b_addr;
  logic                  op_valid, op_last;
  unit_e                 op_unit, wr_unit;
  logic [1:0]            op_mode;
  logic [SIW-1:0]        wr_word;
  logic                  pop_addsub, pop_mult, key_op;
  logic [1:0]            key_mode;

  // Per-cluster signals
  logic [W-1:0]         rd_a [2];
  logic [W-1:0]         rd_b [2];
  logic [W-1:0]         wr_data [2];
  logic [W-1:0]         mul_a [2];
  logic [W-1:0]         mul_b [2];
  logic [ELEM_BITS-1:0] res [2][2];
  logic [1:0]           as_acc, as_val, mu_acc, mu_val;
  logic                 host_cl_q;

  prog_mem #(.DEPTH(PROG_DEPTH)) u_prog (
    .clk, .rd_en(prog_en), .rd_addr(MAW'(prog_raddr)), .rd_data(prog_rdata),
    .wr_en(prog_we && !busy), .wr_addr(MAW'(prog_addr)), .wr_data(prog_wdata)
  );

  khecc_ctrl #(.W(W)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .prog_en, .prog_addr(prog_raddr), .prog_rdata,
    .mem_a_en, .mem_a_we, .mem_a_addr, .mem_b_en, .mem_b_addr,
    .op_valid, .op_last, .op_unit, .op_mode,
    .wr_unit, .wr_word, .pop_addsub, .pop_mult, .key_op, .key_mode,
    .addsub_can_accept(&as_acc), .mult_can_accept(&mu_acc),
    .addsub_res_valid(&as_val), .mult_res_valid(&mu_val),
    .cycles, .stall_cycles
  );

  cswap_bridge #(.W(W), .SCALAR_BITS(SCALAR_BITS)) u_cswap (
    .clk, .rst_n, .key_load(key_load && !busy), .key_in, .key_op, .key_mode,
    .cs_mode(op_mode),
    .a_in(rd_a[0]), .b_in(rd_b[0]), .c_in(rd_a[1]), .d_in(rd_b[1]),
    .m0_a(mul_a[0]), .m0_b(mul_b[0]), .m1_a(mul_a[1]), .m1_b(mul_b[1])
  );

  for (genvar c = 0; c < 2; c++) begin : g_cluster
    logic host_sel;
    assign host_sel = !busy && host_en && (host_cluster == 1'(c));

    data_mem #(.W(W), .DEPTH(MEM_DEPTH)) u_mem (
      .clk,
      .a_en(mem_a_en), .a_we(mem_a_we), .a_addr(MAW'(mem_a_addr)), .a_wdata(wr_data[c]),
      .a_rdata(rd_a[c]),
      .b_en(mem_b_en || host_sel), .b_we(host_sel && host_we),
      .b_addr(busy ? MAW'(mem_b_addr) : MAW'(host_addr)), .b_wdata(host_wdata),
      .b_rdata(rd_b[c])
    );

    gf_addsub #(.W(W), .P(P)) u_addsub (
      .clk, .rst_n,
      .in_valid(op_valid && op_unit == U_ADDSUB), .in_last(op_last), .in_mode(op_mode),
      .in_a(rd_a[c]), .in_b(rd_b[c]),
      .can_accept(as_acc[c]), .res_valid(as_val[c]), .result(res[c][0]),
      .pop(pop_addsub)
    );

    gf_mult #(.W(W), .P(P), .NTHREADS(NTHREADS)) u_mult (
      .clk, .rst_n,
      .in_valid(op_valid && op_unit == U_MULT), .in_last(op_last),
      .in_a(mul_a[c]), .in_b(mul_b[c]),
      .can_accept(mu_acc[c]), .res_valid(mu_val[c]), .result(res[c][1]),
      .pop(pop_mult)
    );

    data_mux #(.W(W), .NUNITS(2)) u_mux (
      .res(res[c]), .unit_sel(wr_unit), .word_idx(wr_word), .wdata(wr_data[c])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) host_cl_q <= 1'b0;
    else if (host_en) host_cl_q <= host_cluster;
  end
  assign host_rdata = host_cl_q ? rd_b[1] : rd_b[0];

  // Both clusters run in lock step, so their unit status must always agree.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (as_acc[0] == as_acc[1]) && (mu_acc[0] == mu_acc[1]) &&
    (as_val[0] == as_val[1]) && (mu_val[0] == mu_val[1]));

endmodule
