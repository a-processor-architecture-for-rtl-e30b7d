// tb_ldi_reg: random LDIST / LDI sequences against a model: set loads the
// address, inc advances it by one, set wins over inc.
module tb_ldi_reg;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, set, inc;
  logic [15:0] set_val, addr;
  int model;

  ldi_reg #(.WIDTH(16)) dut (.clk(clk), .rst_n(rst_n), .set(set), .set_val(set_val), .inc(inc), .addr(addr));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; set = 1'b0; inc = 1'b0; set_val = '0;
    @(posedge clk); #1 rst_n = 1'b1;
    model = 0;
    for (int t = 0; t < 3000; t++) begin
      set = ($urandom % 10) == 0;
      inc = ($urandom % 2) == 0;
      set_val = (t == 5) ? 16'hFFFF : 16'($urandom);
      @(posedge clk); #1;
      if (set) model = set_val;
      else if (inc) model = (model + 1) % 65536;
      checks++;
      if (addr !== 16'(model)) begin
        failures++; $display("FAIL t=%0d: got %h expected %h", t, addr, 16'(model));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
