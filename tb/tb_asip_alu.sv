// tb_asip_alu: random operands through every ALU operation, compared with
// the same operation written directly in the testbench.
module tb_asip_alu;
  import mdpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  alu_op_e op;
  word_t a, b, y;
  asip_alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic word_t model(alu_op_e o, word_t x, word_t z);
    case (o)
      ALU_ADD:   return x + z;
      ALU_SUB:   return x - z;
      ALU_AND:   return x & z;
      ALU_OR:    return x | z;
      ALU_XOR:   return x ^ z;
      ALU_NOT:   return ~z;
      ALU_SEQ:   return (x == z) ? 16'd1 : 16'd0;
      ALU_SNE:   return (x != z) ? 16'd1 : 16'd0;
      ALU_SLTU:  return (x < z) ? 16'd1 : 16'd0;
      ALU_BSET:  begin x[z[3:0]] = 1'b1; return x; end
      ALU_BCLR:  begin x[z[3:0]] = 1'b0; return x; end
      ALU_BTST:  return {15'b0, x[z[3:0]]};
      default:   return z;
    endcase
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 6000; t++) begin
      op = alu_op_e'(t % 13);
      a  = 16'($urandom);
      b  = (t % 7 == 0) ? a : 16'($urandom);
      #1;
      checks++;
      if (y !== model(op, a, b)) begin
        failures++;
        $display("FAIL op %0d a=%h b=%h: got %h expected %h", op, a, b, y, model(op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
