// mdpc_check: the datapath of the MDPCCHK instruction.
//
// It compares the code received with a code word (p_recv, in rd) against the
// code recomputed from the received information bits (p_comp, in rs). The
// syndrome s = p_recv ^ p_comp has, for each of the 8 address bits b, a
// "0" half s[b] and a "1" half s[8+b] (layout of mdpc_gen). Let
// d = s[7:0] ^ s[15:8]:
//   s == 0          -> 00, no error
//   d == 8'hFF      -> 01, one error in the information part; exactly one
//                      half of every address bit flipped, and the "1" halves
//                      spell the error position
//   d one-hot       -> 10, one error in the code part, no correction needed
//   otherwise       -> 11, two or more errors
// Result: [15:14] error type, [13:8] zero, [7:0] = s[15:8], the position of
// the erroneous information bit counted from 0 ([3:0] bit in the word,
// [7:4] word number). The four cases and the use of the "1" halves as the
// position follow the source design; applying them to all 8 address bits,
// the zero bits and the 0-based position are this design's choices.
// Purely combinational.
module mdpc_check
  import mdpc_pkg::*;
(
  input  word_t p_recv,
  input  word_t p_comp,
  output word_t result
);

  word_t      s;
  logic [7:0] d;
  err_type_e  err;

  always_comb begin
    s = p_recv ^ p_comp;
    d = s[7:0] ^ s[15:8];
    if (s == '0)                                err = ERR_NONE;
    else if (d == 8'hFF)                        err = ERR_INFO;
    else if (d != '0 && (d & (d - 8'd1)) == '0) err = ERR_CODE;
    else                                        err = ERR_MULTI;
    result = {err, 6'b0, s[15:8]};
  end

endmodule
