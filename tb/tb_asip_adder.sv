// tb_asip_adder: random and corner-case sums, including the wrap at 16 bits
// used by negative branch offsets.
module tb_asip_adder;
  import mdpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  word_t a, b, y;
  asip_adder dut (.a(a), .b(b), .y(y));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int t = 0; t < 2000; t++) begin
      a = (t < 4) ? 16'hFFFF : 16'($urandom);
      b = (t < 4) ? 16'(t) : 16'($urandom);
      #1;
      s = (int'(a) + int'(b)) % 65536;
      checks++;
      if (y !== 16'(s)) begin
        failures++; $display("FAIL %h + %h: got %h expected %h", a, b, y, 16'(s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
