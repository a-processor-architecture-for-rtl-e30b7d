// tb_mdpc_gen: checks the MDPC GEN datapath.
// 1. The code of 4-bit and 8-bit symbols (A = 2, M = 2 and M = 3) against
//    the parity equations written out bit by bit.
// 2. Random symbols of 1, 2, 4, 8 and 16 words, fed word by word with the
//    word number, against the whole-symbol reference model.
module tb_mdpc_gen;
  import mdpc_pkg::*;
  import mdpc_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  word_t      code_in, word, code_out;
  logic [3:0] word_idx;

  mdpc_gen dut (.code_in(code_in), .word(word), .word_idx(word_idx), .code_out(code_out));

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
    logic [255:0] sym;
    word_t        c;
    logic         u [8];
    int           nw [5] = '{1, 2, 4, 8, 16};

    // M = 2: bits u[0..3] = u11, u12, u21, u22 (first index most significant)
    for (int v = 0; v < 16; v++) begin
      code_in = '0; word = 16'(v); word_idx = '0;
      #1;
      for (int i = 0; i < 4; i++) u[i] = v[i];
      // p(1,1) = u12^u11, p(1,2) = u22^u21 -> address bit 1
      check(code_out[1], u[1] ^ u[0], "M2 p11");
      check(code_out[9], u[3] ^ u[2], "M2 p12");
      // p(2,1) = u21^u11, p(2,2) = u22^u12 -> address bit 0
      check(code_out[0], u[2] ^ u[0], "M2 p21");
      check(code_out[8], u[3] ^ u[1], "M2 p22");
    end
    // M = 3: bits u[0..7] = u111, u112, u121, u122, u211, u212, u221, u222
    for (int v = 0; v < 256; v++) begin
      code_in = '0; word = 16'(v); word_idx = '0;
      #1;
      for (int i = 0; i < 8; i++) u[i] = v[i];
      check(code_out[2],  u[3]^u[2]^u[1]^u[0], "M3 p11");
      check(code_out[10], u[7]^u[6]^u[5]^u[4], "M3 p12");
      check(code_out[1],  u[5]^u[4]^u[1]^u[0], "M3 p21");
      check(code_out[9],  u[7]^u[6]^u[3]^u[2], "M3 p22");
      check(code_out[0],  u[6]^u[4]^u[2]^u[0], "M3 p31");
      check(code_out[8],  u[7]^u[5]^u[3]^u[1], "M3 p32");
    end
    // whole symbols, word by word
    for (int t = 0; t < 40; t++) begin
      for (int s = 0; s < 5; s++) begin
        sym = rand_sym(nw[s]);
        c = '0;
        for (int x = 0; x < nw[s]; x++) begin
          code_in = c; word = sym[16*x +: 16]; word_idx = 4'(x);
          #1;
          c = code_out;
        end
        check(c, ref_code(sym), $sformatf("%0d-word symbol", nw[s]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
