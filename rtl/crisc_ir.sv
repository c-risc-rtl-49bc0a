// crisc_ir: the instruction register.
//
// The IR holds the instruction being executed and feeds its eight bits to
// every other block, which decode it themselves. It is loaded from the memory
// data bus at the end of state one, the prefetch of every instruction, and
// holds during state two. Reset clears it to 0000_0000 (TEST R0), which only
// sets the condition code, so the first cycle after reset is harmless while it
// fetches the instruction at address 0; this follows the document.
//
// Interface: clk, rst_n (asynchronous, active low), state_i from the state
// machine, mdb_i the memory data bus, ir_o the instruction.
// Timing: ir_o changes on the rising clock edge that ends state one.
module crisc_ir
  import crisc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  state_e state_i,
  input  word_t  mdb_i,
  output instr_t ir_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                ir_o <= INSTR_RESET;
    else if (state_i == ST_ONE) ir_o <= instr_t'(mdb_i);
  end

endmodule
