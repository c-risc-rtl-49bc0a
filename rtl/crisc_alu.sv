// crisc_alu: the C-RISC arithmetic unit, a single 8-bit adder with operand
// selection in front of it.
//
// Every one-cycle instruction (i7 = 0) passes through the adder, and the
// condition code is taken from the adder output:
//   000 s1 s0 R : y = ([R] xor {8{i4}}) + i3, which gives TEST (s = 00),
//                 INCR (01), NOT (10) and COMP, the two's complement (11);
//   001 r1 r0 R : y = [B r1 r0]                 (MOV)
//   010 r1 r0 n : y = 0000_0 n2 n1 n0           (MOVI, CLEAR for n = 0)
//   011 r1 r0 R : y = [B r1 r0] + [R]           (ADD, carry dropped)
// The XOR-with-i4, add-i3 trick for the unary group is the document's; the
// operand multiplexing for MOV/MOVI/ADD is this design's simplest reading.
// For i7 = 1 instructions the output is computed but not used.
//
// Interface: ir is the instruction register, a_i is bus A ([B r1 r0]), b_i is
// bus B ([R]). y_o is the result, cn_o its sign bit, cz_o is 1 when it is zero.
// Purely combinational: the result settles within the cycle.
module crisc_alu
  import crisc_pkg::*;
(
  input  instr_t ir,
  input  word_t  a_i,
  input  word_t  b_i,
  output word_t  y_o,
  output logic   cn_o,
  output logic   cz_o
);

  word_t x, z;
  logic  cin;

  always_comb begin
    x   = '0;
    z   = '0;
    cin = 1'b0;
    unique case (ir.op[1:0])
      2'b00: begin                       // unary group
        x   = b_i ^ {WORD_W{ir.rr[1]}};
        cin = ir.rr[0];
      end
      2'b01: x = a_i;                    // MOV
      2'b10: x = word_t'(ir.r);          // MOVI, zero-extended
      2'b11: begin                       // ADD
        x = a_i;
        z = b_i;
      end
      default: ;
    endcase
  end

  assign y_o  = x + z + word_t'(cin);
  assign cn_o = y_o[WORD_W-1];
  assign cz_o = (y_o == '0);

endmodule
