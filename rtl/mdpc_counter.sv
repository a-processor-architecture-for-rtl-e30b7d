// mdpc_counter: the 4-bit word counter of the MDPC generator.
//
// It holds the number x of the information word that the next MDPCGEN
// instruction processes. MDPCINIT clears it and every MDPCGEN advances it by
// one, so a sequence MDPCINIT, MDPCGEN x n walks the words 0..n-1 of a symbol
// of 16*n bits. The 4-bit width is the source design's; wrap-around from
// 15 to 0, the reset value 0 and init taking priority over inc are this
// design's choices. The count changes on the clock edge after init/inc.
module mdpc_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,   // synchronous, active low
  input  logic             init,    // MDPCINIT
  input  logic             inc,     // MDPCGEN
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk) begin
    if (!rst_n || init) count <= '0;
    else if (inc)       count <= count + 1'b1;
  end

endmodule
