// barrel_shifter: 16-bit logical left, logical right and arithmetic right
// shift by 0..15 places.
//
// Combinational, built as four stages that shift by 1, 2, 4 and 8 places
// under control of one bit of the shift amount each; a right shift is done
// as a left shift of the bit-reversed value, with the fill bit being the
// sign for SRA. The source design names the block; its structure here is
// this design's own.
module barrel_shifter
  import mdpc_pkg::*;
(
  input  shift_op_e  op,
  input  word_t      a,
  input  logic [3:0] sh,
  output word_t      y
);

  function automatic word_t rev(word_t v);
    for (int i = 0; i < XLEN; i++) rev[i] = v[XLEN-1-i];
  endfunction

  word_t stage [5];
  logic  fill;

  always_comb begin
    fill     = (op == SH_SRA) ? a[XLEN-1] : 1'b0;
    stage[0] = (op == SH_SLL) ? a : rev(a);
    for (int s = 0; s < 4; s++) begin
      if (sh[s]) stage[s+1] = (stage[s] << (1 << s)) | (fill ? word_t'((1 << (1 << s)) - 1) : '0);
      else       stage[s+1] = stage[s];
    end
    y = (op == SH_SLL) ? stage[4] : rev(stage[4]);
  end

endmodule
