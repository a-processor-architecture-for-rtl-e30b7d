// mdpc_gen: the MDPC GEN datapath of the MDPCGEN instruction.
//
// A multi-dimensional parity check code with A = 2 treats an information
// symbol of 2^M bits as an M-dimensional 2x2x...x2 cube. Bit k of the symbol
// has the address bits k[M-1:0]; for every address bit b there are two parity
// bits, one over all bits whose address bit b is 0 and one over all bits whose
// address bit b is 1. The code is therefore the XOR of the symbol bits sorted
// by each address bit, and it can be built word by word, which is what this
// block does for one 16-bit word per call:
//   * address bits 0..3 are the bit position inside the word, so the word's
//     own 4-dimensional code (8 bits) is XORed into code bits 0..3 / 8..11;
//   * address bits 4..7 are the word number x held by the 4-bit counter, so
//     the parity of the whole word is XORed, for each b = 4..7, into the
//     "0" parity bit (code[b]) or the "1" parity bit (code[8+b]) of b,
//     chosen by bit b-4 of x.
// Sixteen words (256 information bits, M = 8) fill all sixteen code bits.
// Shorter symbols leave the upper address bits at 0: their "0" bit then
// carries the total parity and their "1" bit stays 0, which keeps the check
// rules uniform over all 8 address bits.
//
// Code layout (this design's choice): code[b] = parity of bits with address
// bit b = 0, code[8+b] = parity of bits with address bit b = 1.
// The word-by-word recurrence and the use of the word parity follow the
// source design; the layout is this design's own. Purely combinational.
module mdpc_gen
  import mdpc_pkg::*;
(
  input  word_t      code_in,   // code of words 0..x-1 (rd)
  input  word_t      word,      // information word x (rs)
  input  logic [3:0] word_idx,  // x, from the 4-bit counter
  output word_t      code_out   // code of words 0..x
);

  logic [7:0] zero_par, one_par;
  logic       word_par;

  always_comb begin
    zero_par = '0;
    one_par  = '0;
    word_par = ^word;
    // address bits inside the word
    for (int b = 0; b < 4; b++) begin
      for (int k = 0; k < 16; k++) begin
        if (k[b]) one_par[b]  = one_par[b]  ^ word[k];
        else      zero_par[b] = zero_par[b] ^ word[k];
      end
    end
    // address bits given by the word number
    for (int b = 4; b < 8; b++) begin
      if (word_idx[b-4]) one_par[b]  = word_par;
      else               zero_par[b] = word_par;
    end
    code_out = code_in ^ {one_par, zero_par};
  end

endmodule
