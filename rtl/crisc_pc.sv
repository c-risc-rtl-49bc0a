// crisc_pc: the program counter, its incrementer and the next-address choice.
//
// The PC holds the address of the next instruction to fetch. In state one the
// block puts the fetch address on fetch_addr_o and loads the PC with that
// address plus one. The fetch address is
//   [R]   (bus B) in state one of CALL,
//   [B00] (bus A; RET is encoded with r1 r0 = 00) in state one of RET,
//   PC    otherwise.
// In state two of BR, BREQ and BRLT the PC is loaded with [R] when the
// condition from the CC block holds; state one then fetches from it. So during
// CALL's state two the PC still holds the address after the CALL, which the
// register file saves as the return address. The placement of each transfer
// follows the document's two-cycle clocking figure. Reset clears the PC.
//
// Interface: clk, rst_n (asynchronous, active low), ir_i, state_i, cond_i,
// bus_a_i, bus_b_i; pc_o the PC, fetch_addr_o the address of the instruction
// prefetched in this cycle (valid in state one, combinational).
module crisc_pc
  import crisc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  instr_t ir_i,
  input  state_e state_i,
  input  logic   cond_i,
  input  word_t  bus_a_i,
  input  word_t  bus_b_i,
  output word_t  pc_o,
  output word_t  fetch_addr_o
);

  always_comb begin
    if      (is_call(ir_i)) fetch_addr_o = bus_b_i;
    else if (is_ret(ir_i))  fetch_addr_o = bus_a_i;
    else                    fetch_addr_o = pc_o;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      pc_o <= '0;
    else if (state_i == ST_ONE)
      pc_o <= fetch_addr_o + word_t'(1);
    else if (is_jump(ir_i) && cond_i)
      pc_o <= bus_b_i;
  end

endmodule
