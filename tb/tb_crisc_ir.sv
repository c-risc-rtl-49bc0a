// tb_crisc_ir: checks that the instruction register resets to TEST R0, loads
// the data bus at the end of every state-one cycle and holds in state two.
module tb_crisc_ir;
  import crisc_pkg::*;
  logic   clk = 0, rst_n = 0;
  state_e st;
  word_t  mdb;
  instr_t ir;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  crisc_ir dut (.clk, .rst_n, .state_i(st), .mdb_i(mdb), .ir_o(ir));

  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    word_t expv;
    st = ST_ONE; mdb = 8'hA5;
    #12;
    chk(ir == INSTR_RESET, "reset value");
    rst_n = 1;
    expv = '0;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      st  = state_e'($urandom_range(0, 1));
      mdb = 8'($urandom);
      if (st == ST_ONE) expv = mdb;
      @(posedge clk); #1;
      chk(ir == instr_t'(expv), $sformatf("step %0d ir=%02h exp=%02h", k, ir, expv));
    end
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
