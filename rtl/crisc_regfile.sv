// crisc_regfile: the 8 x 8-bit register file with its own address decoding.
//
// Two read ports and one write port, as in the document's block diagram:
//   port A reads [B r1 r0], operand 1 in the current bank (bus A), and
//          [B00] for RET;
//   port B reads [R], operand 2, an absolute register number (bus B);
//   port C writes bus C.
// The block decides for itself what port C writes, from the instruction and
// the controller state:
//   state one, i7 = 0 : the ALU result, into [R] when i6 = 0 and into
//                       [B r1 r0] when i6 = 1 (the document's i6 rule);
//   state one, LOAD   : the MDR, into [B r1 r0];
//   state two, CALL   : the program counter (the return address) into
//                       register 00 of the bank being entered, {!B, 00},
//                       because B flips at the same clock edge.
// TEST writes its unchanged operand back to [R], so the i6 rule needs no
// exception. Reads are combinational; the write happens on the rising edge.
// Resetting the registers to zero is this design's choice.
//
// Interface: clk, rst_n (asynchronous, active low), ir_i, state_i, bank_i,
// alu_i (ALU result), mdr_i, pc_i; bus_a_o, bus_b_o the two read ports.
module crisc_regfile
  import crisc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  instr_t ir_i,
  input  state_e state_i,
  input  logic   bank_i,
  input  word_t  alu_i,
  input  word_t  mdr_i,
  input  word_t  pc_i,
  output word_t  bus_a_o,
  output word_t  bus_b_o
);

  word_t   regs [NREGS];
  regnum_t addr_a;
  regnum_t waddr;
  word_t   wdata;
  logic    we;

  // RET reads [B00] whatever its low five bits hold.
  assign addr_a  = bank_reg(bank_i, is_ret(ir_i) ? 2'b00 : ir_i.rr);
  assign bus_a_o = regs[addr_a];
  assign bus_b_o = regs[ir_i.r];

  always_comb begin
    we    = 1'b0;
    waddr = addr_a;
    wdata = alu_i;
    if (state_i == ST_ONE) begin
      if (!is_two_cycle(ir_i)) begin
        we    = 1'b1;
        waddr = ir_i.op[1] ? addr_a : ir_i.r;
        wdata = alu_i;
      end else if (ir_i.op == OP_LOAD) begin
        we    = 1'b1;
        waddr = addr_a;
        wdata = mdr_i;
      end
    end else if (is_call(ir_i)) begin
      we    = 1'b1;
      waddr = bank_reg(~bank_i, 2'b00);
      wdata = pc_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NREGS; k++) regs[k] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

endmodule
