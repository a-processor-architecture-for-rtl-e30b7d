// tb_imau: the fetch stage captures the addressed word into IR with its
// address one cycle later, and drops it on flush or when fetch is disabled.
module tb_imau;
  import mdpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, fetch_en, flush, ir_valid;
  word_t pc, imem_rdata, ir, ir_pc;
  logic [7:0] imem_addr;
  word_t rom [256];

  imau #(.AW(8)) dut (.clk(clk), .rst_n(rst_n), .pc(pc), .fetch_en(fetch_en), .flush(flush),
                      .imem_addr(imem_addr), .imem_rdata(imem_rdata), .ir(ir), .ir_pc(ir_pc),
                      .ir_valid(ir_valid));
  assign imem_rdata = rom[imem_addr];

  task automatic check(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic keep;
    for (int i = 0; i < 256; i++) rom[i] = 16'($urandom);
    rst_n = 1'b0; fetch_en = 1'b1; flush = 1'b0; pc = '0;
    @(posedge clk); #1 rst_n = 1'b1;
    check(16'(ir_valid), 16'd0, "invalid after reset");
    check(ir, NOP_INSN, "NOP after reset");
    for (int t = 0; t < 2000; t++) begin
      pc = 16'($urandom);
      fetch_en = ($urandom % 5) != 0;
      flush = ($urandom % 5) == 0;
      keep = fetch_en && !flush;
      @(posedge clk); #1;
      check(16'(ir_valid), 16'(keep), "valid");
      if (keep) begin
        check(ir, rom[pc[7:0]], "IR word");
        check(ir_pc, pc, "IR address");
      end else begin
        check(ir, NOP_INSN, "squashed IR");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
