// tb_barrel_shifter: every shift amount and kind on random values, compared
// with the language's shift operators.
module tb_barrel_shifter;
  import mdpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  shift_op_e  op;
  word_t      a, y, exp;
  logic [3:0] sh;
  barrel_shifter dut (.op(op), .a(a), .sh(sh), .y(y));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      op = shift_op_e'(t % 3);
      sh = 4'(t / 3);
      a  = 16'($urandom);
      #1;
      case (op)
        SH_SLL:  exp = a << sh;
        SH_SRL:  exp = a >> sh;
        default: exp = word_t'($signed(a) >>> sh);
      endcase
      checks++;
      if (y !== exp) begin
        failures++; $display("FAIL op %0d a=%h sh=%0d: got %h expected %h", op, a, sh, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
