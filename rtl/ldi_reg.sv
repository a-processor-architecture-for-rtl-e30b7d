// ldi_reg: the LDI address register (LDIREG).
//
// LDIST loads it with an address; each LDI instruction loads the data word
// at the address it holds and advances it by one, so a run of LDI
// instructions streams consecutive words without separate address
// arithmetic. `addr` is the current value, used as the load address in the
// same cycle; set/inc take effect at the clock edge (set wins). The 16-bit
// width follows the source design; post-increment by one word and reset to
// 0 are this design's reading.
module ldi_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             set,      // LDIST
  input  logic [WIDTH-1:0] set_val,
  input  logic             inc,      // LDI
  output logic [WIDTH-1:0] addr
);

  always_ff @(posedge clk) begin
    if (!rst_n)   addr <= '0;
    else if (set) addr <= set_val;
    else if (inc) addr <= addr + 1'b1;
  end

endmodule
