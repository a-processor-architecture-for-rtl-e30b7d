// tb_mdpc_fix: a random word with one bit flipped at a random position is
// restored by the fix datapath given an MDPCCHK-style result for that bit.
module tb_mdpc_fix;
  import mdpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  word_t word, chk, fixed;
  mdpc_fix dut (.word(word), .chk(chk), .fixed(fixed));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t orig;
    int pos;
    for (int t = 0; t < 1000; t++) begin
      orig = 16'($urandom);
      pos  = $urandom % 16;
      word = orig ^ (16'd1 << pos);
      chk  = {2'b01, 6'($urandom), 4'($urandom), 4'(pos)};
      #1;
      checks++;
      if (fixed !== orig) begin
        failures++; $display("FAIL pos %0d: got %h expected %h", pos, fixed, orig);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
