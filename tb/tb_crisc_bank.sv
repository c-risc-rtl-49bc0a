// tb_crisc_bank: checks the bank bit. It resets to 0, inverts at the end of
// state two of CALL and at the end of state one of RET, and holds for every
// other instruction and state.
module tb_crisc_bank;
  import crisc_pkg::*;
  logic   clk = 0, rst_n = 0;
  instr_t ir;
  state_e st;
  logic   b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  crisc_bank dut (.clk, .rst_n, .ir_i(ir), .state_i(st), .bank_o(b));

  initial begin
    logic expv;
    int flips = 0;
    ir = instr_t'(8'hDB); st = ST_TWO;
    #12;
    checks++; if (b != 1'b0) failures++;
    ir = '0; st = ST_ONE;   // neutral inputs for the first edge after reset
    rst_n = 1;
    expv = 1'b0;
    for (int k = 0; k < 400; k++) begin
      logic [7:0] i;
      @(negedge clk);
      case ($urandom_range(0, 3))
        0: i = 8'hD8 | 8'($urandom_range(0, 7));   // CALL R
        1: i = 8'h80;                               // RET
        default: i = 8'($urandom);
      endcase
      ir = instr_t'(i);
      st = state_e'($urandom_range(0, 1));
      if ((i[7:3] == 5'b11011 && st == ST_TWO) || (i[7:5] == 3'b100 && st == ST_ONE)) begin
        expv = ~expv; flips++;
      end
      @(posedge clk); #1;
      checks++;
      if (b != expv) begin failures++; $display("FAIL step %0d ir=%02h", k, i); end
    end
    checks++; if (flips == 0) failures++;
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
