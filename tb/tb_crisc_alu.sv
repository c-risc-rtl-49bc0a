// tb_crisc_alu: checks the ALU result and flags for every one-cycle opcode,
// every first operand and every second operand field, against arithmetic
// written out per instruction (TEST, INCR, NOT, COMP, MOV, MOVI, ADD), with
// random and corner-case bus values.
module tb_crisc_alu;
  import crisc_pkg::*;
  instr_t ir;
  word_t  a, b, y;
  logic   cn, cz;
  int checks = 0, failures = 0;

  crisc_alu dut (.ir(ir), .a_i(a), .b_i(b), .y_o(y), .cn_o(cn), .cz_o(cz));

  function automatic word_t expect_y(logic [7:0] i, word_t av, word_t bv);
    case (i[6:3])
      4'b0000: return bv;                 // TEST
      4'b0001: return bv + 8'd1;          // INCR
      4'b0010: return ~bv;                // NOT
      4'b0011: return 8'd0 - bv;          // COMP
      default: ;
    endcase
    case (i[6:5])
      2'b01:   return av;                 // MOV
      2'b10:   return {5'b0, i[2:0]};     // MOVI
      default: return av + bv;            // ADD
    endcase
  endfunction

  initial begin
    word_t e;
    for (int rep = 0; rep < 40; rep++) begin
      for (int i = 0; i < 128; i++) begin
        ir = instr_t'(8'(i));
        case (rep)
          0: begin a = 8'h00; b = 8'h00; end
          1: begin a = 8'hFF; b = 8'h01; end
          2: begin a = 8'h80; b = 8'h80; end
          3: begin a = 8'h7F; b = 8'hFF; end
          default: begin a = 8'($urandom); b = 8'($urandom); end
        endcase
        #1;
        e = expect_y(8'(i), a, b);
        checks++;
        if (y !== e || cn !== e[7] || cz !== (e == 0)) begin
          failures++;
          if (failures < 10) $display("FAIL ir=%02h a=%02h b=%02h y=%02h exp=%02h", i, a, b, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
