// asip_alu: the 16-bit ALU of the processor.
//
// Combinational. Covers the arithmetic (ADD, SUB), logical (AND, OR, XOR,
// NOT), comparison (equal, not equal, unsigned less-than) and bit (set,
// clear, test) operations of the base instruction set; shifts go to the
// barrel shifter. Operand a is rd, operand b is rs or an immediate; for the
// bit operations b[3:0] is the bit number. Comparisons and bit test return
// 0 or 1, NOT returns ~b and PASSB returns b (load immediate). The operation
// set follows the source design; result conventions are this design's.
module asip_alu
  import mdpc_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  word_t bitmask;

  always_comb begin
    bitmask = word_t'(1) << b[3:0];
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_NOT:   y = ~b;
      ALU_SEQ:   y = word_t'(a == b);
      ALU_SNE:   y = word_t'(a != b);
      ALU_SLTU:  y = word_t'(a < b);
      ALU_BSET:  y = a | bitmask;
      ALU_BCLR:  y = a & ~bitmask;
      ALU_BTST:  y = word_t'((a & bitmask) != '0);
      ALU_PASSB: y = b;
      default:   y = a;
    endcase
  end

endmodule
