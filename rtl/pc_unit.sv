// pc_unit: program counter with next-PC selection.
//
// Word-addressed 16-bit PC. Each cycle it moves to pc + 1 unless `hold`
// (sleep) keeps it; `redirect` loads `target` instead and takes priority
// over hold (branches, jumps, DBRNZ, TRAP, RETI, interrupts). Reset loads
// RESET_PC. The block is named in the source design; word addressing and
// the reset address are this design's choices.
module pc_unit
  import mdpc_pkg::*;
#(
  parameter word_t RESET_PC = 16'h0000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  hold,
  input  logic  redirect,
  input  word_t target,
  output word_t pc
);

  always_ff @(posedge clk) begin
    if (!rst_n)        pc <= RESET_PC;
    else if (redirect) pc <= target;
    else if (!hold)    pc <= pc + 16'd1;
  end

endmodule
