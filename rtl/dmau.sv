// dmau: data memory access unit.
//
// Connects the execute stage to a word-addressed 16-bit data memory with
// combinational read and write on the clock edge. For a load or store it
// drives the base + offset address; for LDI it drives the LDI register
// instead. Load data returns in the same cycle on ld_data. Only the low AW
// address bits reach the memory (lint reports the upper address bits
// as unused). The block is named in the source design;
// the memory interface is this design's own.
module dmau
  import mdpc_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic          ld,        // LDH
  input  logic          st,        // STH
  input  logic          ldi,       // LDI
  input  word_t         ea,        // base + offset
  input  word_t         ldi_addr,  // LDI register
  input  word_t         st_data,
  output logic [AW-1:0] mem_addr,
  output logic          mem_re,
  output logic          mem_we,
  output word_t         mem_wdata,
  input  word_t         mem_rdata,
  output word_t         ld_data
);

  word_t addr;

  always_comb begin
    addr      = ldi ? ldi_addr : ea;
    mem_addr  = addr[AW-1:0];
    mem_re    = ld | ldi;
    mem_we    = st & ~(ld | ldi);
    mem_wdata = st_data;
    ld_data   = mem_re ? mem_rdata : '0;
  end

endmodule
