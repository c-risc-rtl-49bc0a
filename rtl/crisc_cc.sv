// crisc_cc: the condition code register (C_N, C_Z) and the branch condition.
//
// C_N (negative) and C_Z (zero) are taken from the ALU adder and stored at the
// end of state one of every i7 = 0 instruction; i7 = 1 instructions leave
// them unchanged. Both follow the document. The block also evaluates the
// condition of the instruction in the IR for the program counter:
//   s1 s0 = 00 (BR) and 11 (CALL): always taken;
//   s1 s0 = 01 (BREQ): taken when C_N C_Z = 01;
//   s1 s0 = 10 (BRLT): taken when C_N C_Z = 10;
// i.e. a conditional branch is taken when {C_N, C_Z} equals {i4, i3}, which is
// how the instruction set table defines BREQ and BRLT. Reset clears both bits.
//
// Interface: clk, rst_n (asynchronous, active low), ir_i, state_i, cn_i and
// cz_i from the ALU, cn_o and cz_o the stored bits, cond_o the condition
// (combinational from the stored bits and the IR).
module crisc_cc
  import crisc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  instr_t ir_i,
  input  state_e state_i,
  input  logic   cn_i,
  input  logic   cz_i,
  output logic   cn_o,
  output logic   cz_o,
  output logic   cond_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cn_o <= 1'b0;
      cz_o <= 1'b0;
    end else if (state_i == ST_ONE && !is_two_cycle(ir_i)) begin
      cn_o <= cn_i;
      cz_o <= cz_i;
    end
  end

  assign cond_o = (ir_i.rr[1] == ir_i.rr[0]) || ({cn_o, cz_o} == ir_i.rr);

endmodule
