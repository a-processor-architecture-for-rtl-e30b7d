// gpr: general purpose register file, NREGS x 16 bits.
//
// Two combinational read ports (A for rd, B for rs) and one write port that
// writes on the rising clock edge, so a value written is read from the next
// cycle on. A synchronous active-low reset clears every register. The
// DBRNZ loop counter is register 5, so NREGS must be at least 6. The
// register count of 16 (4-bit fields) and the reset are this design's
// choices.
module gpr
  import mdpc_pkg::*;
#(
  parameter int unsigned NREGS = 16,
  localparam int unsigned RW = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RW-1:0] ra,
  input  logic [RW-1:0] rb,
  output word_t         da,
  output word_t         db,
  input  logic          we,
  input  logic [RW-1:0] wa,
  input  word_t         wd
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign da = regs[ra];
  assign db = regs[rb];

endmodule
