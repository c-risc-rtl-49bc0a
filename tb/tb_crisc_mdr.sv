// tb_crisc_mdr: checks that the memory data register captures the data bus
// only at the end of state two of a LOAD and holds otherwise.
module tb_crisc_mdr;
  import crisc_pkg::*;
  logic   clk = 0, rst_n = 0;
  instr_t ir;
  state_e st;
  word_t  mdb, q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  crisc_mdr dut (.clk, .rst_n, .ir_i(ir), .state_i(st), .mdb_i(mdb), .mdr_o(q));

  initial begin
    word_t expv;
    int loads = 0;
    ir = instr_t'(8'hE0); st = ST_TWO; mdb = 8'h5A;
    #12;
    checks++; if (q != 8'h00) failures++;
    rst_n = 1;
    expv = 8'h00;
    for (int k = 0; k < 300; k++) begin
      logic [7:0] i;
      @(negedge clk);
      i = ($urandom_range(0, 1) == 0) ? (8'hE0 | 8'($urandom_range(0, 31))) : 8'($urandom);
      ir = instr_t'(i);
      st = state_e'($urandom_range(0, 1));
      mdb = 8'($urandom);
      if (i[7:5] == 3'b111 && st == ST_TWO) begin expv = mdb; loads++; end
      @(posedge clk); #1;
      checks++;
      if (q != expv) begin failures++; $display("FAIL step %0d", k); end
    end
    checks++; if (loads == 0) failures++;
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
