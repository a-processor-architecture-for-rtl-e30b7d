// mdpc_fix: the datapath of the MDPCFIX instruction.
//
// Inverts the bit of the 16-bit word (rd) whose index is given by bits [3:0]
// of an MDPCCHK result (rs). Software selects the word (bits [7:4] of the
// MDPCCHK result) and checks the error type before using it, as in the
// source design, so the bit is inverted whatever the type bits say; only
// chk[3:0] is used and lint reports the other bits as unused.
// Purely combinational.
module mdpc_fix
  import mdpc_pkg::*;
(
  input  word_t word,   // word holding one erroneous bit
  input  word_t chk,    // MDPCCHK result
  output word_t fixed
);

  always_comb begin
    fixed = word;
    fixed[chk[3:0]] = ~word[chk[3:0]];
  end

endmodule
