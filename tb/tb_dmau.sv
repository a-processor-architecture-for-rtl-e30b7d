// tb_dmau: the access unit in front of a small memory array: stores through
// it, then loads by address and by LDI address, checking strobes, address
// selection and returned data.
module tb_dmau;
  import mdpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ld, st, ldi;
  word_t ea, ldi_addr, st_data, mem_wdata, mem_rdata, ld_data;
  logic [7:0] mem_addr;
  logic mem_re, mem_we;
  word_t mem [256];
  word_t shadow [256];

  dmau #(.AW(8)) dut (.ld(ld), .st(st), .ldi(ldi), .ea(ea), .ldi_addr(ldi_addr), .st_data(st_data),
                      .mem_addr(mem_addr), .mem_re(mem_re), .mem_we(mem_we), .mem_wdata(mem_wdata),
                      .mem_rdata(mem_rdata), .ld_data(ld_data));

  assign mem_rdata = mem[mem_addr];
  always_ff @(posedge clk) if (mem_we) mem[mem_addr] <= mem_wdata;

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
    int a;
    ld = 0; st = 0; ldi = 0; ea = '0; ldi_addr = '0; st_data = '0;
    for (int i = 0; i < 256; i++) begin
      st = 1; ea = 16'(i) | 16'h0F00; st_data = 16'($urandom); shadow[i] = st_data;
      #1 check(16'(mem_we), 16'd1, "store strobe");
      check(16'(mem_re), 16'd0, "no read on store");
      @(posedge clk); #1;
    end
    st = 0;
    for (int t = 0; t < 1000; t++) begin
      a = $urandom % 256;
      ldi = t % 2; ld = !ldi;
      ea       = ldi ? 16'($urandom) : 16'(a);
      ldi_addr = ldi ? 16'(a) : 16'($urandom);
      #1;
      check(ld_data, shadow[a], ldi ? "LDI load" : "load");
      check(16'(mem_re), 16'd1, "read strobe");
      check(16'(mem_we), 16'd0, "no write on load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
