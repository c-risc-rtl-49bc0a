// tb_crisc_cc: checks the condition code register and the branch condition.
// C_N C_Z must load from the ALU only in state one of i7 = 0 instructions;
// BR and CALL are always taken, BREQ only with C_N C_Z = 01, BRLT only with
// C_N C_Z = 10.
module tb_crisc_cc;
  import crisc_pkg::*;
  logic   clk = 0, rst_n = 0;
  instr_t ir;
  state_e st;
  logic   cn_i, cz_i, cn, cz, cond;
  int checks = 0, failures = 0;
  int n_eq = 0, n_lt = 0;

  always #5 clk = ~clk;
  crisc_cc dut (.clk, .rst_n, .ir_i(ir), .state_i(st), .cn_i(cn_i), .cz_i(cz_i),
                .cn_o(cn), .cz_o(cz), .cond_o(cond));

  initial begin
    logic en, ez, ec;
    ir = '0; st = ST_TWO; cn_i = 1; cz_i = 1;
    #12;
    checks++; if ({cn, cz} != 2'b00) failures++;
    rst_n = 1;
    en = 0; ez = 0;
    for (int k = 0; k < 1000; k++) begin
      logic [7:0] i;
      @(negedge clk);
      i = ($urandom_range(0, 1) == 0) ? (8'hC0 | 8'($urandom_range(0, 31))) : 8'($urandom);
      ir = instr_t'(i);
      st = state_e'($urandom_range(0, 1));
      {cn_i, cz_i} = 2'($urandom);
      #1;
      case (i[4:3])
        2'b01:   begin ec = !en && ez;  if (ec) n_eq++; end
        2'b10:   begin ec = en && !ez;  if (ec) n_lt++; end
        default: ec = 1'b1;
      endcase
      checks++;
      if (cond != ec) begin failures++; if (failures < 10) $display("FAIL cond ir=%02h", i); end
      if (st == ST_ONE && !i[7]) begin en = cn_i; ez = cz_i; end
      @(posedge clk); #1;
      checks++;
      if ({cn, cz} != {en, ez}) begin failures++; if (failures < 10) $display("FAIL cc ir=%02h", i); end
    end
    checks++; if (n_eq == 0 || n_lt == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
