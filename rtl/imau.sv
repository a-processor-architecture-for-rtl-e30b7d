// imau: instruction memory access unit with the instruction register.
//
// Fetch stage of the two-stage pipeline. The PC addresses a word-addressed
// instruction memory with combinational read; at the clock edge the word is
// captured in IR together with its address (ir_pc) and a valid bit. With
// `flush` (taken branch, jump, trap, interrupt) or without `fetch_en`
// (sleep) the captured instruction is dropped: IR becomes a NOP with
// ir_valid = 0. After reset IR is an invalid NOP. The PC -> IMAU -> IR path
// is the source design's; registering IR as a pipeline stage is this
// design's choice.
module imau
  import mdpc_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  word_t         pc,
  input  logic          fetch_en,
  input  logic          flush,
  output logic [AW-1:0] imem_addr,
  input  word_t         imem_rdata,
  output word_t         ir,
  output word_t         ir_pc,
  output logic          ir_valid
);

  assign imem_addr = pc[AW-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n || flush || !fetch_en) begin
      ir       <= NOP_INSN;
      ir_valid <= 1'b0;
      ir_pc    <= rst_n ? pc : '0;
    end else begin
      ir       <= imem_rdata;
      ir_valid <= 1'b1;
      ir_pc    <= pc;
    end
  end

endmodule
