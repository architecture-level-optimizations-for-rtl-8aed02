// khecc_pkg: types and constants shared by the Kummer-HECC scalar-multiplication
// accelerator (two-cluster A4 organisation).
//
// A GF(P) element is 128 bits wide. It is stored in memory as S words of W bits,
// with S*W = 136 (W = 34, 68 or 136, as in the width configurations w34/w68/w136).
// Instructions are 36 bits: 4-bit opcode, 3-bit unit index, 2-bit operation mode,
// two 9-bit memory addresses and a 9-bit immediate, as the instruction format
// prescribes. The bit order of the fields and the numeric opcode and unit codes are
// this design's own choice.
package khecc_pkg;

  // Width of a stored element (S words of W bits).
  localparam int unsigned ELEM_BITS  = 136;
  // Width of the field element proper.
  localparam int unsigned FIELD_BITS = 128;
  // Digit width of the arithmetic units (w_arith).
  localparam int unsigned DIGIT      = 34;
  localparam int unsigned NDIGITS    = ELEM_BITS / DIGIT;

  localparam int unsigned ADDR_BITS  = 9;
  localparam int unsigned IMM_BITS   = 9;
  localparam int unsigned INSTR_BITS = 36;

  // Default prime: 2^127 - 1, the field of the Gaudry-Schost Kummer surface.
  localparam logic [FIELD_BITS-1:0] P_DEFAULT = {1'b0, {127{1'b1}}};

  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,
    OP_READ  = 4'd1,
    OP_WRITE = 4'd2,
    OP_WAIT  = 4'd3,
    OP_JUMP  = 4'd4,
    OP_END   = 4'd5
  } opcode_e;

  typedef enum logic [2:0] {
    U_ADDSUB = 3'd0,
    U_MULT   = 3'd1,
    U_CSWAP  = 3'd2
  } unit_e;

  // Mode field meaning per unit.
  //   AddSub : 0 = add, 1 = subtract
  //   Mult   : 0 = straight operands, 1 = CS0, 2 = CS1 (applied by the CSWAP bridge)
  //   CSWAP  : 0 = point the key-bit index at the top bit, 1 = step to the next lower bit
  //   jump   : 0 = unconditional, 1 = load loop counter with imm (no jump),
  //            2 = decrement loop counter and jump if it is still non-zero
  localparam logic [1:0] MD_ADD      = 2'd0;
  localparam logic [1:0] MD_SUB      = 2'd1;
  localparam logic [1:0] MD_STRAIGHT = 2'd0;
  localparam logic [1:0] MD_CS0      = 2'd1;
  localparam logic [1:0] MD_CS1      = 2'd2;
  localparam logic [1:0] MD_KEY_INIT = 2'd0;
  localparam logic [1:0] MD_KEY_NEXT = 2'd1;
  localparam logic [1:0] MD_JMP      = 2'd0;
  localparam logic [1:0] MD_LOOP_SET = 2'd1;
  localparam logic [1:0] MD_LOOP_DEC = 2'd2;

  typedef struct packed {
    opcode_e               op;     // [35:32]
    unit_e                 unit;   // [31:29]
    logic [1:0]            mode;   // [28:27]
    logic [ADDR_BITS-1:0]  addr1;  // [26:18]
    logic [ADDR_BITS-1:0]  addr2;  // [17:9]
    logic [IMM_BITS-1:0]   imm;    // [8:0]
  } instr_t;

  // -P^-1 mod 2^DIGIT, by Newton iteration on the odd modulus (x <- x*(2 - p*x)).
  // Only the low digit of the modulus matters.
  function automatic logic [DIGIT-1:0] mont_pinv(input logic [DIGIT-1:0] p0);
    logic [DIGIT-1:0] x;
    x = 1;
    for (int i = 0; i < 6; i++) x = x * (2 - p0 * x);
    return -x;
  endfunction

endpackage
