// crisc_bank: the bank bit B.
//
// The eight registers form two banks of four, 0-3 and 4-7; B picks the bank
// that the r1 r0 operand addresses. CALL inverts B in its state two, before
// the return address is written to the new bank's register B00; RET inverts
// it in its state one, after [B00] of the callee's bank has been used as the
// return address. This follows the document's CALL/RET definitions and
// clocking figure. Reset selects bank 0 (the reset value is not given by the
// document).
//
// Interface: clk, rst_n (asynchronous, active low), ir_i the instruction,
// state_i the controller state, bank_o the bank bit.
module crisc_bank
  import crisc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  instr_t ir_i,
  input  state_e state_i,
  output logic   bank_o
);

  logic flip;
  assign flip = (is_call(ir_i) && state_i == ST_TWO) ||
                (is_ret(ir_i)  && state_i == ST_ONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    bank_o <= 1'b0;
    else if (flip) bank_o <= ~bank_o;
  end

endmodule
