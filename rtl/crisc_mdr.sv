// crisc_mdr: the memory data register.
//
// During state two of a LOAD the memory returns M[[R]] on the data bus; the
// MDR captures it at the end of that cycle and holds it through state one,
// when the register file writes it into [B r1 r0]. The document shows the
// MDR and its load control L; the exact capture point is this design's
// reading of the LOAD row of the two-cycle clocking figure. Reset clears it.
//
// Interface: clk, rst_n (asynchronous, active low), ir_i, state_i,
// mdb_i the memory data bus, mdr_o the captured word.
module crisc_mdr
  import crisc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  instr_t ir_i,
  input  state_e state_i,
  input  word_t  mdb_i,
  output word_t  mdr_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                        mdr_o <= '0;
    else if (ir_i.op == OP_LOAD && state_i == ST_TWO)  mdr_o <= mdb_i;
  end

endmodule
