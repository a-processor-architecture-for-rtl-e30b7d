// mdpc_unit: the MDPC Generator, execution unit of the custom instructions.
//
// It holds the 4-bit word counter and the three combinational datapaths:
//   MDPC_INIT : clears the counter (no register result)
//   MDPC_GEN  : result = code(rd) updated with word(rs) as word number
//               `count`, then the counter advances
//   MDPC_CHK  : result = error type and position of received code rd
//               against recomputed code rs
//   MDPC_FIX  : result = rd with the bit selected by rs[3:0] inverted
// The result is combinational from the operands in the same cycle; the
// counter changes on the following clock edge. The counter and MDPC GEN
// sit in this unit in the source design; placing the check and fix logic
// here too is this design's choice.
module mdpc_unit
  import mdpc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  mdpc_op_e   op,
  input  word_t      rd_val,
  input  word_t      rs_val,
  output word_t      result,
  output logic [3:0] count
);

  word_t gen_out, chk_out, fix_out;

  mdpc_counter #(.WIDTH(4)) u_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .init  (op == MDPC_INIT),
    .inc   (op == MDPC_GEN),
    .count (count)
  );

  mdpc_gen u_gen (
    .code_in  (rd_val),
    .word     (rs_val),
    .word_idx (count),
    .code_out (gen_out)
  );

  mdpc_check u_chk (
    .p_recv (rd_val),
    .p_comp (rs_val),
    .result (chk_out)
  );

  mdpc_fix u_fix (
    .word  (rd_val),
    .chk   (rs_val),
    .fixed (fix_out)
  );

  always_comb begin
    unique case (op)
      MDPC_GEN: result = gen_out;
      MDPC_CHK: result = chk_out;
      MDPC_FIX: result = fix_out;
      default:  result = rd_val;
    endcase
  end

endmodule
