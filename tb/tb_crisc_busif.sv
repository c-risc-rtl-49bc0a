// tb_crisc_busif: checks the memory bus drivers for random instructions and
// states: state one reads at the fetch address; state two of LOAD reads and
// of STORE writes bus A, both at the address on bus B; state two of the other
// two-cycle instructions leaves the bus idle.
module tb_crisc_busif;
  import crisc_pkg::*;
  instr_t ir;
  state_e st;
  word_t  fa, pc, a, b, addr, wdata;
  logic   re, we;
  int checks = 0, failures = 0;

  crisc_busif dut (.ir_i(ir), .state_i(st), .fetch_addr_i(fa), .pc_i(pc),
                   .bus_a_i(a), .bus_b_i(b), .mem_addr_o(addr), .mem_re_o(re),
                   .mem_we_o(we), .mem_wdata_o(wdata));

  initial begin
    for (int k = 0; k < 2000; k++) begin
      logic [7:0] i;
      logic ok;
      i  = 8'($urandom);
      ir = instr_t'(i);
      st = state_e'($urandom_range(0, 1));
      fa = 8'($urandom); pc = 8'($urandom); a = 8'($urandom); b = 8'($urandom);
      #1;
      if (st == ST_ONE)                ok = addr == fa && re && !we;
      else if (i[7:5] == 3'b111)       ok = addr == b && re && !we;
      else if (i[7:5] == 3'b101)       ok = addr == b && !re && we && wdata == a;
      else                             ok = !re && !we;
      checks++;
      if (!ok) begin failures++; if (failures < 10) $display("FAIL ir=%02h st=%0d", i, st); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
