// tb_mdpc_check: builds code words of 1 to 16 words, injects no error, one
// information-bit error, one code-bit error, or two errors, and checks the
// error type and, for one information error, the position reported.
module tb_mdpc_check;
  import mdpc_pkg::*;
  import mdpc_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  word_t p_recv, p_comp, result;
  mdpc_check dut (.p_recv(p_recv), .p_comp(p_comp), .result(result));

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
    word_t code, rcode;
    int nw, nbits, e1, e2, kind, cb;
    for (int t = 0; t < 2000; t++) begin
      nw    = 1 << ($urandom % 5);
      nbits = 16 * nw;
      sym   = rand_sym(nw);
      code  = ref_code(sym);
      rx    = sym;
      rcode = code;
      kind  = t % 5;
      cb    = $urandom % 16;
      e1 = $urandom % nbits;
      e2 = $urandom % nbits;
      if (e2 == e1) e2 = (e1 + 1) % nbits;
      case (kind)
        0: ;                                   // no error
        1: rx[e1] = ~rx[e1];                   // one information error
        2: rcode[cb] = ~rcode[cb];       // one code error
        3: begin rx[e1] = ~rx[e1]; rx[e2] = ~rx[e2]; end
        default: begin rx[e1] = ~rx[e1]; rcode[cb] = ~rcode[cb]; end
      endcase
      p_recv = rcode;
      p_comp = ref_code(rx);
      #1;
      case (kind)
        0: check(result, 16'h0000, "no error");
        1: check(result, {2'b01, 6'b0, 8'(e1)}, "one information error");
        2: check(result[15:14], 2'b10, "one code error");
        default: check(result[15:14], 2'b11, "two errors");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
