// asip_adder: the separate 16-bit address adder of the processor.
//
// Combinational y = a + b, wrapping at 16 bits. The processor uses it for
// PC-relative branch and jump targets (PC of the instruction plus a
// sign-extended offset) and for base + offset data addresses, so that the
// ALU stays free for the register result. The source design shows the adder
// beside the ALU; this use of it is this design's choice.
module asip_adder
  import mdpc_pkg::*;
(
  input  word_t a,
  input  word_t b,
  output word_t y
);

  assign y = a + b;

endmodule
