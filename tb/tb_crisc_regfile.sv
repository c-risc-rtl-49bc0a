// tb_crisc_regfile: checks the register file against an array model under
// random instructions, states, bank bits and write data. Each cycle it checks
// both read ports (bus A = [B r1 r0], or [B00] for RET; bus B = [R]) and,
// after the edge, the write the block must have decoded for itself: ALU
// result to [R] or [B r1 r0] by bit i6 in state one of i7 = 0 instructions,
// MDR to [B r1 r0] in state one of LOAD, PC to {!B, 00} in state two of CALL.
module tb_crisc_regfile;
  import crisc_pkg::*;
  logic   clk = 0, rst_n = 0;
  instr_t ir;
  state_e st;
  logic   bank;
  word_t  alu, mdr, pc, bus_a, bus_b;
  word_t  m [8];
  int checks = 0, failures = 0;
  int n_alu_op1 = 0, n_alu_op2 = 0, n_load = 0, n_call = 0;

  always #5 clk = ~clk;
  crisc_regfile dut (.clk, .rst_n, .ir_i(ir), .state_i(st), .bank_i(bank),
                     .alu_i(alu), .mdr_i(mdr), .pc_i(pc), .bus_a_o(bus_a), .bus_b_o(bus_b));

  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    ir = '0; st = ST_TWO; bank = 0; alu = 0; mdr = 0; pc = 0;
    for (int k = 0; k < 8; k++) m[k] = 8'h00;
    #12;
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      logic [7:0] i;
      logic [2:0] ra;
      @(negedge clk);
      i = 8'($urandom);
      ir = instr_t'(i);
      st = state_e'($urandom_range(0, 1));
      bank = 1'($urandom);
      alu = 8'($urandom); mdr = 8'($urandom); pc = 8'($urandom);
      #1;
      ra = (i[7:5] == 3'b100) ? {bank, 2'b00} : {bank, i[4:3]};
      chk(bus_a == m[ra], $sformatf("bus A ir=%02h", i));
      chk(bus_b == m[i[2:0]], $sformatf("bus B ir=%02h", i));
      if (st == ST_ONE && !i[7]) begin
        if (i[6]) begin m[{bank, i[4:3]}] = alu; n_alu_op1++; end
        else      begin m[i[2:0]] = alu;         n_alu_op2++; end
      end else if (st == ST_ONE && i[7:5] == 3'b111) begin
        m[{bank, i[4:3]}] = mdr; n_load++;
      end else if (st == ST_TWO && i[7:3] == 5'b11011) begin
        m[{~bank, 2'b00}] = pc; n_call++;
      end
      @(posedge clk); #1;
      for (int r = 0; r < 8; r++) chk(dut.regs[r] == m[r], $sformatf("R%0d after ir=%02h st=%0d", r, i, st));
    end
    chk(n_alu_op1 > 0 && n_alu_op2 > 0 && n_load > 0 && n_call > 0, "all write kinds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
