// tb_mdpc_counter: checks clear, count, hold, wrap from 15 to 0 and init
// taking priority over inc.
module tb_mdpc_counter;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, init, inc;
  logic [3:0] count;
  int model;

  mdpc_counter #(.WIDTH(4)) dut (.clk(clk), .rst_n(rst_n), .init(init), .inc(inc), .count(count));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; init = 1'b0; inc = 1'b0;
    @(posedge clk); #1 rst_n = 1'b1;
    model = 0;
    checks++; if (count !== 4'd0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 1000; i++) begin
      init = ($urandom % 23) == 0;
      inc  = ($urandom % 3) != 0;
      @(posedge clk); #1;
      if (init) model = 0;
      else if (inc) model = (model + 1) % 16;
      checks++;
      if (count !== 4'(model)) begin
        failures++; $display("FAIL step %0d: got %0d expected %0d", i, count, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
