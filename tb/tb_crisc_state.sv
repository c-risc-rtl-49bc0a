// tb_crisc_state: checks the two-state controller. After reset it is in state
// one; from state one it enters state two exactly when the word prefetched
// has bit 7 set; state two always returns to state one.
module tb_crisc_state;
  import crisc_pkg::*;
  logic   clk = 0, rst_n = 0;
  word_t  mdb;
  state_e st;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  crisc_state dut (.clk, .rst_n, .mdb_i(mdb), .state_o(st));

  initial begin
    state_e expv;
    int n_two = 0;
    mdb = 8'hFF;
    #12;
    checks++; if (st != ST_ONE) failures++;
    rst_n = 1;
    expv = ST_ONE;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      mdb = 8'($urandom);
      expv = (st == ST_ONE && mdb[7]) ? ST_TWO : ST_ONE;
      @(posedge clk); #1;
      checks++;
      if (st != expv) begin failures++; $display("FAIL step %0d", k); end
      if (st == ST_TWO) n_two++;
    end
    checks++; if (n_two == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
