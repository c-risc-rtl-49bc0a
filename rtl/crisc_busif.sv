// crisc_busif: the drivers of the memory address bus (MAB) and memory data
// bus (MDB).
//
// In state one the address bus carries the fetch address from the PC block
// and memory is read (the prefetch). In state two of LOAD and STORE it
// carries the data address [R] from bus B; LOAD reads, STORE drives [B r1 r0]
// (bus A) onto the data bus with the write strobe. In state two of the other
// two-cycle instructions the bus is idle and shows the PC. The document shows
// these drivers and the PC/data-address choice; the separate read and write
// strobes replace the chip's tri-state data bus, since this design keeps
// data-in and data-out apart.
//
// Interface: ir_i, state_i, fetch_addr_i, pc_i, bus_a_i, bus_b_i;
// mem_addr_o, mem_re_o, mem_we_o, mem_wdata_o. Combinational: the memory
// answers a read within the cycle and takes a write at its end.
module crisc_busif
  import crisc_pkg::*;
(
  input  instr_t ir_i,
  input  state_e state_i,
  input  word_t  fetch_addr_i,
  input  word_t  pc_i,
  input  word_t  bus_a_i,
  input  word_t  bus_b_i,
  output word_t  mem_addr_o,
  output logic   mem_re_o,
  output logic   mem_we_o,
  output word_t  mem_wdata_o
);

  logic data_cycle;
  assign data_cycle = state_i == ST_TWO && (ir_i.op == OP_LOAD || ir_i.op == OP_STORE);

  always_comb begin
    mem_addr_o  = pc_i;
    mem_re_o    = 1'b0;
    mem_we_o    = 1'b0;
    mem_wdata_o = bus_a_i;
    if (state_i == ST_ONE) begin
      mem_addr_o = fetch_addr_i;
      mem_re_o   = 1'b1;
    end else if (data_cycle) begin
      mem_addr_o = bus_b_i;
      mem_re_o   = ir_i.op == OP_LOAD;
      mem_we_o   = ir_i.op == OP_STORE;
    end
  end

endmodule
