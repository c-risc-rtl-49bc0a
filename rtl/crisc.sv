// crisc: the C-RISC processor, an 8-bit reduced instruction set computer whose
// instruction set was chosen from the statements C programs execute most.
//
// Eight 8-bit registers in two banks of four, a bank bit B that CALL and RET
// flip to give each procedure level its own registers, an adder-based ALU,
// a two-bit condition code (C_N, C_Z), a program counter and a single memory
// reached through an 8-bit address bus and an 8-bit data bus. There is no
// central decoder: every block reads the instruction register and decodes its
// own part, and a two-state controller tells them which cycle it is.
//
// Timing. One clock cycle here stands for one phi1/phi2 pair of the original
// two-phase clock. Every instruction ends with a state-one cycle that
// prefetches the next instruction into the IR. i7 = 0 instructions (TEST,
// INCR, NOT, COMP, MOV, MOVI, ADD) do all their work in that cycle: one cycle
// each. i7 = 1 instructions (RET, STORE, BR, BREQ, BRLT, CALL, LOAD) spend a
// state-two cycle first, for the data transfer of LOAD/STORE or the
// PC and bank update of the control transfers: two cycles each.
//
// Memory. mem_addr_o is valid all cycle; a read (mem_re_o) must be answered
// combinationally on mem_rdata_i within the cycle; a write (mem_we_o,
// mem_wdata_o) is taken by the memory at the rising edge that ends the cycle.
// Instructions and data share the one memory.
//
// The remaining outputs show the architectural state for observation and
// debug. rst_n is asynchronous and active low; after it the IR holds TEST R0
// and the PC 0, so the first cycle fetches the instruction at address 0.
module crisc
  import crisc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  output word_t  mem_addr_o,
  input  word_t  mem_rdata_i,
  output word_t  mem_wdata_o,
  output logic   mem_we_o,
  output logic   mem_re_o,
  output word_t  pc_o,
  output instr_t ir_o,
  output state_e state_o,
  output logic   bank_o,
  output logic   cn_o,
  output logic   cz_o
);

  instr_t ir;
  state_e state;
  logic   bank;
  word_t  bus_a, bus_b, alu_y, mdr, pc, fetch_addr;
  logic   alu_cn, alu_cz, cond;

  crisc_ir u_ir (
    .clk, .rst_n, .state_i(state), .mdb_i(mem_rdata_i), .ir_o(ir)
  );

  crisc_state u_state (
    .clk, .rst_n, .mdb_i(mem_rdata_i), .state_o(state)
  );

  crisc_bank u_bank (
    .clk, .rst_n, .ir_i(ir), .state_i(state), .bank_o(bank)
  );

  crisc_regfile u_rf (
    .clk, .rst_n, .ir_i(ir), .state_i(state), .bank_i(bank),
    .alu_i(alu_y), .mdr_i(mdr), .pc_i(pc),
    .bus_a_o(bus_a), .bus_b_o(bus_b)
  );

  crisc_alu u_alu (
    .ir(ir), .a_i(bus_a), .b_i(bus_b), .y_o(alu_y), .cn_o(alu_cn), .cz_o(alu_cz)
  );

  crisc_cc u_cc (
    .clk, .rst_n, .ir_i(ir), .state_i(state), .cn_i(alu_cn), .cz_i(alu_cz),
    .cn_o(cn_o), .cz_o(cz_o), .cond_o(cond)
  );

  crisc_pc u_pc (
    .clk, .rst_n, .ir_i(ir), .state_i(state), .cond_i(cond),
    .bus_a_i(bus_a), .bus_b_i(bus_b), .pc_o(pc), .fetch_addr_o(fetch_addr)
  );

  crisc_mdr u_mdr (
    .clk, .rst_n, .ir_i(ir), .state_i(state), .mdb_i(mem_rdata_i), .mdr_o(mdr)
  );

  crisc_busif u_busif (
    .ir_i(ir), .state_i(state), .fetch_addr_i(fetch_addr), .pc_i(pc),
    .bus_a_i(bus_a), .bus_b_i(bus_b),
    .mem_addr_o(mem_addr_o), .mem_re_o(mem_re_o), .mem_we_o(mem_we_o),
    .mem_wdata_o(mem_wdata_o)
  );

  // Bus rules: memory is never read and written in the same cycle, every
  // state-one cycle reads (the prefetch), and state two lasts one cycle.
  a_bus_excl:  assert property (@(posedge clk) disable iff (!rst_n) !(mem_re_o && mem_we_o));
  a_prefetch:  assert property (@(posedge clk) disable iff (!rst_n) state == ST_ONE |-> mem_re_o);
  a_two_short: assert property (@(posedge clk) disable iff (!rst_n) state == ST_TWO |=> state == ST_ONE);

  assign pc_o    = pc;
  assign ir_o    = ir;
  assign state_o = state;
  assign bank_o  = bank;

endmodule
