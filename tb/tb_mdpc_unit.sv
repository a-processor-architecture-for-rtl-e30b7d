// tb_mdpc_unit: drives the MDPC generator unit the way the instruction
// sequence MDPCINIT, MDPCGEN x n, MDPCCHK, MDPCFIX does and checks each
// result against the reference model, including the counter sequence.
module tb_mdpc_unit;
  import mdpc_pkg::*;
  import mdpc_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst_n;
  mdpc_op_e   op;
  word_t      rd_val, rs_val, result;
  logic [3:0] count;

  mdpc_unit dut (.clk(clk), .rst_n(rst_n), .op(op), .rd_val(rd_val), .rs_val(rs_val),
                 .result(result), .count(count));

  task automatic check(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] sym, rx;
    word_t code, rc;
    int nw, e;
    rst_n = 1'b0; op = MDPC_NONE; rd_val = '0; rs_val = '0;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      nw  = 1 << (t % 5);
      sym = rand_sym(nw);
      op = MDPC_INIT; rd_val = 16'($urandom);
      @(posedge clk); #1;
      check(16'(count), 16'd0, "count after INIT");
      // encode
      code = '0;
      for (int x = 0; x < nw; x++) begin
        op = MDPC_GEN; rd_val = code; rs_val = sym[16*x +: 16];
        #1 code = result;
        @(posedge clk); #1;
        check(16'(count), 16'((x + 1) % 16), "count after GEN");
      end
      check(code, ref_code(sym), "encoded code");
      // receive with one information error, recompute, check, fix
      e  = $urandom % (16 * nw);
      rx = sym; rx[e] = ~rx[e];
      op = MDPC_INIT; @(posedge clk); #1;
      rc = '0;
      for (int x = 0; x < nw; x++) begin
        op = MDPC_GEN; rd_val = rc; rs_val = rx[16*x +: 16];
        #1 rc = result;
        @(posedge clk); #1;
      end
      op = MDPC_CHK; rd_val = code; rs_val = rc;
      #1 check(result, {2'b01, 6'b0, 8'(e)}, "check result");
      rs_val = result; rd_val = rx[16*(e/16) +: 16];
      op = MDPC_FIX;
      #1 check(result, sym[16*(e/16) +: 16], "fixed word");
      op = MDPC_NONE;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
