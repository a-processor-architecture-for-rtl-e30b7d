// tb_pc_unit: sequential increment, hold, redirect and the priority of
// redirect over hold, against a model of the next-PC rule.
module tb_pc_unit;
  import mdpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, hold, redirect;
  word_t target, pc;
  int model;

  pc_unit #(.RESET_PC(16'h0000)) dut (.clk(clk), .rst_n(rst_n), .hold(hold), .redirect(redirect),
                                      .target(target), .pc(pc));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; hold = 0; redirect = 0; target = '0;
    @(posedge clk); #1 rst_n = 1'b1;
    model = 0;
    checks++; if (pc !== 16'h0000) begin failures++; $display("FAIL reset PC"); end
    for (int t = 0; t < 3000; t++) begin
      hold = ($urandom % 4) == 0;
      redirect = ($urandom % 6) == 0;
      target = 16'($urandom);
      @(posedge clk); #1;
      if (redirect) model = target;
      else if (!hold) model = (model + 1) % 65536;
      checks++;
      if (pc !== 16'(model)) begin
        failures++; $display("FAIL t=%0d: got %h expected %h", t, pc, 16'(model));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
