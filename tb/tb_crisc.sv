// tb_crisc: end-to-end test of the C-RISC core with a behavioural memory.
//
// An instruction-level reference model (regs, memory, PC, B, C_N, C_Z) runs in
// lockstep with the core. Each state-one cycle completes the instruction in
// the IR; the model then executes one instruction and the testbench compares
// the register file, bank bit, condition code, PC and the instruction fetched,
// and checks that the instruction took 1 cycle (i7 = 0) or 2 (i7 = 1).
//
// Phase 1 runs a small hand-written program: a loop that loads five array
// elements and calls a subroutine, working in the other register bank, that
// adds each to a running sum; the sum is stored to memory (150 at 0x25).
// Phase 2 repeatedly fills the whole memory with random bytes, resets, and
// runs the random code, self-modifying stores included, for a fixed number of
// instructions, then compares the whole memory.
// Every instruction kind, both outcomes of BREQ and BRLT, CALL from each bank
// and RET into each bank must occur at least once. The core runs at its
// default (and only) size.
module tb_crisc;
  import crisc_pkg::*;

  localparam int RANDOM_RUNS   = 60;
  localparam int RANDOM_INSTRS = 600;   // per run
  localparam int WATCHDOG      = 200000;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  word_t  mem_addr, mem_rdata, mem_wdata, pc;
  logic   mem_we, mem_re, bank, cn, cz;
  instr_t ir;
  state_e state;

  int checks = 0;
  int failures = 0;
  int cycles = 0;

  always #5 clk = ~clk;

  crisc dut (
    .clk, .rst_n,
    .mem_addr_o(mem_addr), .mem_rdata_i(mem_rdata), .mem_wdata_o(mem_wdata),
    .mem_we_o(mem_we), .mem_re_o(mem_re),
    .pc_o(pc), .ir_o(ir), .state_o(state), .bank_o(bank), .cn_o(cn), .cz_o(cz)
  );

  crisc_mem_model u_mem (
    .clk, .addr(mem_addr), .rdata(mem_rdata), .wdata(mem_wdata), .we(mem_we)
  );

  always @(posedge clk) cycles <= cycles + 1;

  // ---------------- reference model ----------------
  logic [7:0] m_regs [8];
  logic [7:0] m_mem  [256];
  logic [7:0] m_pc;
  logic       m_b, m_cn, m_cz;

  // mechanism counters
  int n_kind [16];  // 0 TEST 1 INCR 2 NOT 3 COMP 4 MOV 5 MOVI 6 ADD 7 RET
                    // 8 STORE 9 BR 10 BREQ 11 BRLT 12 CALL 13 LOAD 14 CLEAR
  int n_breq_taken, n_breq_not, n_brlt_taken, n_brlt_not;
  int n_call_from0, n_call_from1, n_ret_to0, n_ret_to1, n_two_cycle;

  task automatic set_cc(input logic [7:0] y);
    m_cn = y[7];
    m_cz = (y == 8'h00);
  endtask

  // Execute one instruction of the ISA as the instruction table defines it.
  task automatic model_exec(input logic [7:0] i);
    logic [2:0] op, r, brr;
    logic [1:0] s;
    logic [7:0] y, nxt;
    op  = i[7:5];
    s   = i[4:3];
    r   = i[2:0];
    brr = {m_b, s};
    nxt = m_pc + 8'd1;
    case (op)
      3'b000: begin
        case (s)
          2'b00: y = m_regs[r];
          2'b01: y = m_regs[r] + 8'd1;
          2'b10: y = ~m_regs[r];
          default: y = 8'd0 - m_regs[r];
        endcase
        m_regs[r] = y; set_cc(y); n_kind[s]++;
      end
      3'b001: begin y = m_regs[brr]; m_regs[r] = y; set_cc(y); n_kind[4]++; end
      3'b010: begin y = {5'b0, r}; m_regs[brr] = y; set_cc(y); n_kind[r == 0 ? 14 : 5]++; end
      3'b011: begin y = m_regs[brr] + m_regs[r]; m_regs[brr] = y; set_cc(y); n_kind[6]++; end
      3'b100: begin
        nxt = m_regs[{m_b, 2'b00}];
        if (m_b) n_ret_to0++; else n_ret_to1++;
        m_b = ~m_b; n_kind[7]++;
      end
      3'b101: begin m_mem[m_regs[r]] = m_regs[brr]; n_kind[8]++; end
      3'b110: begin
        case (s)
          2'b00: begin nxt = m_regs[r]; n_kind[9]++; end
          2'b01: begin
            n_kind[10]++;
            if (!m_cn && m_cz) begin nxt = m_regs[r]; n_breq_taken++; end else n_breq_not++;
          end
          2'b10: begin
            n_kind[11]++;
            if (m_cn && !m_cz) begin nxt = m_regs[r]; n_brlt_taken++; end else n_brlt_not++;
          end
          default: begin
            if (m_b) n_call_from1++; else n_call_from0++;
            m_b = ~m_b;
            m_regs[{m_b, 2'b00}] = nxt;
            nxt = m_regs[r];
            n_kind[12]++;
          end
        endcase
      end
      default: begin m_regs[brr] = m_mem[m_regs[r]]; n_kind[13]++; end
    endcase
    if (op[2]) n_two_cycle++;
    m_pc = nxt;
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cycles, what);
    end
  endtask

  task automatic compare_state();
    for (int k = 0; k < 8; k++)
      check(dut.u_rf.regs[k] == m_regs[k], $sformatf("R%0d dut=%02h model=%02h", k, dut.u_rf.regs[k], m_regs[k]));
    check(bank == m_b, $sformatf("bank dut=%0d model=%0d", bank, m_b));
    check({cn, cz} == {m_cn, m_cz}, $sformatf("cc dut=%b%b model=%b%b", cn, cz, m_cn, m_cz));
    check(pc == m_pc + 8'd1, $sformatf("pc dut=%02h model next=%02h", pc, m_pc));
  endtask

  // Reset the core and the model, with memory already loaded into both.
  task automatic do_reset();
    rst_n = 1'b0;
    @(negedge clk); @(negedge clk);
    for (int k = 0; k < 8; k++) m_regs[k] = 8'h00;
    m_pc = 8'h00; m_b = 1'b0; m_cn = 1'b0; m_cz = 1'b0;
    rst_n = 1'b1;
    // The first cycle executes the reset instruction TEST R0 and fetches address 0.
    check(state == ST_ONE && ir == INSTR_RESET, "reset state");
    @(posedge clk); #1;
    set_cc(m_regs[0]);
    check(ir == instr_t'(m_mem[0]), "first fetch from address 0");
    compare_state();
  endtask

  // Run one instruction in the core and the model, then compare.
  task automatic step_one();
    logic [7:0] i;
    int n;
    i = m_mem[m_pc];
    check(ir == instr_t'(i), $sformatf("IR dut=%02h model=%02h at %02h", ir, i, m_pc));
    n = 0;
    forever begin
      @(negedge clk);
      n++;
      if (state == ST_ONE) break;
      if (n > 4) break;
    end
    check(n == (i[7] ? 2 : 1), $sformatf("instr %02h took %0d cycles", i, n));
    @(posedge clk); #1;
    model_exec(i);
    compare_state();
  endtask

  // ---------------- directed program ----------------
  localparam int HALT_ADDR = 18;
  localparam logic [7:0] PROG [29] = '{
    8'h54, 8'h72, 8'h72, 8'h72, 8'h48, 8'h5D, 8'h1B, 8'h46,   // 0-7   setup
    8'h60, 8'h27, 8'h60, 8'h26,                               // 8-11  R7 = 12, R6 = 24
    8'hE2, 8'hDE, 8'h0A, 8'h0B, 8'hD7,                        // 12-16 loop
    8'hAA, 8'h00,                                             // 17-18 store sum, halt
    8'h00, 8'h00, 8'h00, 8'h00, 8'h00,                        // 19-23
    8'h48, 8'h69, 8'h68, 8'h29, 8'h80                         // 24-28 subroutine
  };

  initial begin
    int guard;
    // Phase 1
    for (int a = 0; a < 256; a++) begin u_mem.mem[a] = 8'h00; m_mem[a] = 8'h00; end
    for (int a = 0; a < 29; a++) begin u_mem.mem[a] = PROG[a]; m_mem[a] = PROG[a]; end
    for (int a = 0; a < 5; a++) begin
      u_mem.mem[8'h20 + a] = 8'(10 * (a + 1));
      m_mem[8'h20 + a]     = 8'(10 * (a + 1));
    end
    do_reset();
    guard = 0;
    while (m_pc != HALT_ADDR[7:0] && guard < 500) begin step_one(); guard++; end
    check(u_mem.mem[8'h25] == 8'd150, $sformatf("sum stored = %0d, expected 150", u_mem.mem[8'h25]));
    check(dut.u_rf.regs[1] == 8'd150 && dut.u_rf.regs[3] == 8'd0 && bank == 1'b0, "final R1/R3/bank");
    check(n_kind[12] == 5 && n_kind[7] == 5, "five calls and returns");
    check(n_brlt_taken == 4 && n_brlt_not == 1, "loop branch taken 4 times, falls through once");

    // Phase 2
    for (int run = 0; run < RANDOM_RUNS; run++) begin
      for (int a = 0; a < 256; a++) begin
        logic [7:0] v;
        v = 8'($urandom);
        u_mem.mem[a] = v; m_mem[a] = v;
      end
      do_reset();
      for (int k = 0; k < RANDOM_INSTRS; k++) step_one();
      for (int a = 0; a < 256; a++)
        check(u_mem.mem[a] == m_mem[a], $sformatf("mem[%02h] dut=%02h model=%02h", a, u_mem.mem[a], m_mem[a]));
    end

    // Every mechanism must have occurred.
    for (int k = 0; k < 15; k++) check(n_kind[k] > 0, $sformatf("instruction kind %0d never ran", k));
    check(n_breq_taken > 0 && n_breq_not > 0, "BREQ taken and not taken");
    check(n_brlt_taken > 0 && n_brlt_not > 0, "BRLT taken and not taken");
    check(n_call_from0 > 0 && n_call_from1 > 0, "CALL from both banks");
    check(n_ret_to0 > 0 && n_ret_to1 > 0, "RET into both banks");
    check(n_two_cycle > 0, "two-cycle instructions");
    $display("kinds TEST=%0d INCR=%0d NOT=%0d COMP=%0d MOV=%0d MOVI=%0d ADD=%0d RET=%0d STORE=%0d BR=%0d BREQ=%0d BRLT=%0d CALL=%0d LOAD=%0d CLEAR=%0d",
             n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_kind[4], n_kind[5], n_kind[6], n_kind[7],
             n_kind[8], n_kind[9], n_kind[10], n_kind[11], n_kind[12], n_kind[13], n_kind[14]);
    $display("BREQ taken/not %0d/%0d BRLT taken/not %0d/%0d CALL from B0/B1 %0d/%0d RET to B0/B1 %0d/%0d, %0d cycles",
             n_breq_taken, n_breq_not, n_brlt_taken, n_brlt_not, n_call_from0, n_call_from1,
             n_ret_to0, n_ret_to1, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) n_kind[k] = 0;
    {n_breq_taken, n_breq_not, n_brlt_taken, n_brlt_not} = '0;
    {n_call_from0, n_call_from1, n_ret_to0, n_ret_to1, n_two_cycle} = '0;
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
