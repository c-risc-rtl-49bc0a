// crisc_state: the two-state controller of the C-RISC.
//
// The instruction set makes this decoding trivial: i7 = 0 instructions take
// one cycle (state one only), i7 = 1 instructions take two (state two, then
// state one). State one always ends with the prefetch of the next
// instruction, so the next state is chosen from bit 7 of the word being
// prefetched: state two if it is set, state one otherwise. State two is
// always followed by state one. This follows the document's one-cycle and
// two-cycle clocking; choosing the state from the incoming word is this
// design's way of entering state two in the first cycle of the instruction.
//
// Interface: clk, rst_n (asynchronous, active low, enters state one),
// mdb_i the memory data bus (read only in state one), state_o the state.
module crisc_state
  import crisc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  word_t  mdb_i,
  output state_e state_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   state_o <= ST_ONE;
    else if (state_o == ST_TWO)   state_o <= ST_ONE;
    else                          state_o <= mdb_i[WORD_W-1] ? ST_TWO : ST_ONE;
  end

endmodule
