// tb_crisc_pc: checks the program counter block under random instructions,
// states, conditions and bus values. The fetch address must be [R] (bus B)
// for CALL, [B00] (bus A) for RET and the PC otherwise; state one must load
// the PC with the fetch address plus one; state two of BR/BREQ/BRLT must load
// [R] when the condition holds and hold the PC when it does not.
module tb_crisc_pc;
  import crisc_pkg::*;
  logic   clk = 0, rst_n = 0;
  instr_t ir;
  state_e st;
  logic   cond;
  word_t  a, b, pc, fa;
  int checks = 0, failures = 0;
  int n_taken = 0, n_not = 0;

  always #5 clk = ~clk;
  crisc_pc dut (.clk, .rst_n, .ir_i(ir), .state_i(st), .cond_i(cond),
                .bus_a_i(a), .bus_b_i(b), .pc_o(pc), .fetch_addr_o(fa));

  initial begin
    word_t epc, efa;
    ir = '0; st = ST_ONE; cond = 0; a = 8'h11; b = 8'h22;
    #12;
    checks++; if (pc != 8'h00) failures++;
    ir = '0; st = ST_TWO;   // neutral inputs for the first edge after reset
    rst_n = 1;
    epc = 8'h00;
    for (int k = 0; k < 2000; k++) begin
      logic [7:0] i;
      @(negedge clk);
      case ($urandom_range(0, 3))
        0: i = 8'hC0 | 8'($urandom_range(0, 31));
        1: i = 8'h80;
        default: i = 8'($urandom);
      endcase
      ir = instr_t'(i);
      st = state_e'($urandom_range(0, 1));
      cond = 1'($urandom);
      a = 8'($urandom); b = 8'($urandom);
      #1;
      if (i[7:3] == 5'b11011)   efa = b;
      else if (i[7:5] == 3'b100) efa = a;
      else                       efa = epc;
      checks++;
      if (fa != efa) begin failures++; if (failures < 10) $display("FAIL fetch ir=%02h", i); end
      if (st == ST_ONE) epc = efa + 8'd1;
      else if (i[7:5] == 3'b110 && i[4:3] != 2'b11) begin
        if (cond) begin epc = b; n_taken++; end else n_not++;
      end
      @(posedge clk); #1;
      checks++;
      if (pc != epc) begin failures++; if (failures < 10) $display("FAIL pc ir=%02h st=%0d", i, st); end
    end
    checks++; if (n_taken == 0 || n_not == 0) failures++;
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
