// tb_gpr: random writes and reads on both ports against a shadow copy,
// checking the reset value and that a write shows from the next cycle.
module tb_gpr;
  import mdpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, we;
  logic [3:0] ra, rb, wa;
  word_t da, db, wd;
  word_t shadow [16];

  gpr #(.NREGS(16)) dut (.clk(clk), .rst_n(rst_n), .ra(ra), .rb(rb), .da(da), .db(db),
                         .we(we), .wa(wa), .wd(wd));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we = 1'b0; wa = '0; wd = '0; ra = '0; rb = '0;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int i = 0; i < 16; i++) shadow[i] = '0;
    for (int t = 0; t < 3000; t++) begin
      ra = 4'($urandom); rb = 4'($urandom);
      we = $urandom % 2; wa = 4'($urandom); wd = 16'($urandom);
      #1;
      checks += 2;
      if (da !== shadow[ra]) begin failures++; $display("FAIL port A r%0d: %h vs %h", ra, da, shadow[ra]); end
      if (db !== shadow[rb]) begin failures++; $display("FAIL port B r%0d: %h vs %h", rb, db, shadow[rb]); end
      @(posedge clk); #1;
      if (we) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
