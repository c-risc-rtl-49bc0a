// crisc_pkg: types and constants shared by every C-RISC block.
//
// The C-RISC is an 8-bit processor with one-byte instructions. An instruction
// i7..i0 splits into a 3-bit opcode (i7 i6 i5), a 2-bit first operand (i4 i3)
// that is either a register offset r1 r0 inside the current bank or a
// sub-opcode s1 s0, and a 3-bit second operand (i2 i1 i0) that is either an
// absolute register number R or a small constant n. These fields and the
// opcode values follow the instruction set table of the C-RISC. Bit i7 marks
// the two-cycle instructions, bit i6 the destination (1: operand 1, [B r1 r0];
// 0: operand 2, [R]). Each block decodes what it needs from the instruction
// itself; the helper functions below keep that decoding in one place.
package crisc_pkg;

  localparam int unsigned WORD_W  = 8;  // data, address and instruction width
  localparam int unsigned NREGS   = 8;  // registers in the register file
  localparam int unsigned REG_A_W = 3;  // register number width

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [REG_A_W-1:0] regnum_t;

  typedef enum logic [2:0] {
    OP_UNARY  = 3'b000,  // TEST / INCR / NOT / COMP on [R], selected by s1 s0
    OP_MOV    = 3'b001,  // [R] = [B r1 r0]
    OP_MOVI   = 3'b010,  // [B r1 r0] = n (CLEAR when n = 0)
    OP_ADD    = 3'b011,  // [B r1 r0] = [B r1 r0] + [R]
    OP_RET    = 3'b100,  // RET, written 1000_0000: PC = [B00], B = !B (low bits ignored)
    OP_STORE  = 3'b101,  // M[[R]] = [B r1 r0]
    OP_BRANCH = 3'b110,  // BR / BREQ / BRLT / CALL, selected by s1 s0
    OP_LOAD   = 3'b111   // [B r1 r0] = M[[R]]
  } opcode_e;

  // Sub-opcodes of OP_UNARY.
  localparam logic [1:0] SUB_TEST = 2'b00;
  localparam logic [1:0] SUB_INCR = 2'b01;
  localparam logic [1:0] SUB_NOT  = 2'b10;
  localparam logic [1:0] SUB_COMP = 2'b11;

  // Sub-opcodes of OP_BRANCH. BREQ and BRLT branch when {C_N, C_Z} equals s1 s0.
  localparam logic [1:0] SUB_BR   = 2'b00;
  localparam logic [1:0] SUB_BREQ = 2'b01;
  localparam logic [1:0] SUB_BRLT = 2'b10;
  localparam logic [1:0] SUB_CALL = 2'b11;

  typedef struct packed {
    opcode_e     op;   // i7 i6 i5
    logic [1:0]  rr;   // i4 i3: r1 r0 or s1 s0
    regnum_t     r;    // i2 i1 i0: R or n2 n1 n0
  } instr_t;

  // The two control states. Every instruction ends in ST_ONE, where the next
  // instruction is prefetched; i7 = 1 instructions spend one ST_TWO first.
  typedef enum logic {
    ST_ONE = 1'b0,
    ST_TWO = 1'b1
  } state_e;

  // Instruction held by the IR after reset: TEST R0, which only sets C_N C_Z.
  localparam instr_t INSTR_RESET = '0;

  function automatic logic is_two_cycle(instr_t i);
    return i.op[2];
  endfunction

  function automatic logic is_call(instr_t i);
    return i.op == OP_BRANCH && i.rr == SUB_CALL;
  endfunction

  // A jump (BR, BREQ, BRLT): target [R], subject to the condition code.
  function automatic logic is_jump(instr_t i);
    return i.op == OP_BRANCH && i.rr != SUB_CALL;
  endfunction

  function automatic logic is_ret(instr_t i);
    return i.op == OP_RET;
  endfunction

  // Register number of operand 1 in the given bank.
  function automatic regnum_t bank_reg(logic bank, logic [1:0] rr);
    return {bank, rr};
  endfunction

endpackage
