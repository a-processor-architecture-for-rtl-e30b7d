// tb_mdpc_workloads: encodes and decodes information symbols of 16, 32,
// 64, 128 and 256 bits on the processor at its default parameters.
//
// For each size it runs, from reset to SLEEP:
//   * the encode program, checking the stored code against the reference;
//   * the decode program on an error-free code word (result type 00, data
//     untouched);
//   * the decode program with one random information bit flipped (type 01,
//     position reported, word corrected in memory).
// It measures the cycles of each run and checks them against the timing of
// the two-stage pipeline: the word loop LDI, MDPCGEN, DBRNZ costs 3 cycles
// plus 1 for the taken DBRNZ, i.e. 4 cycles per word, and every run must
// stay within the cycle counts published for the original processor
// (encode 20/26/38/62/110, decode with correction 36/42/54/78/126).
module tb_mdpc_workloads;
  import mdpc_pkg::*;
  import mdpc_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, irq, irq_ack, sleeping, retired;
  logic [11:0] imem_addr, dmem_addr;
  logic        dmem_re, dmem_we;
  word_t       imem_rdata, dmem_wdata, dmem_rdata;
  word_t       imem [4096];
  word_t       dmem [4096];

  mdpc_asip dut (
    .clk(clk), .rst_n(rst_n),
    .imem_addr(imem_addr), .imem_rdata(imem_rdata),
    .dmem_addr(dmem_addr), .dmem_re(dmem_re), .dmem_we(dmem_we),
    .dmem_wdata(dmem_wdata), .dmem_rdata(dmem_rdata),
    .irq(irq), .irq_ack(irq_ack), .sleeping(sleeping), .retired(retired)
  );

  assign imem_rdata = imem[imem_addr];
  assign dmem_rdata = dmem[dmem_addr];
  always_ff @(posedge clk) if (dmem_we) dmem[dmem_addr] <= dmem_wdata;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic load(input prog_t p);
    for (int i = 0; i < 4096; i++) imem[i] = NOP_INSN;
    foreach (p[i]) imem[i] = p[i];
  endtask

  // reset, run to SLEEP, return the cycles from the first fetch to SLEEP
  task automatic run(output int cycles);
    rst_n = 1'b0;
    @(posedge clk); @(posedge clk); #1;
    rst_n = 1'b1;
    cycles = 0;
    while (!sleeping && cycles < 2000) begin
      @(posedge clk); #1;
      cycles++;
    end
    check(sleeping, "program reached SLEEP");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sizes [5]     = '{16, 32, 64, 128, 256};
    int paper_enc [5] = '{20, 26, 38, 62, 110};
    int paper_dec [5] = '{36, 42, 54, 78, 126};
    int enc_cyc [5], dec0_cyc [5], dec1_cyc [5];
    logic [255:0] sym, rx;
    word_t code, res;
    int n, e;

    irq = 1'b0; rst_n = 1'b0;
    for (int i = 0; i < 4096; i++) dmem[i] = '0;

    for (int s = 0; s < 5; s++) begin
      n = sizes[s] / 16;
      sym = rand_sym(n);
      code = ref_code(sym);

      // encode
      load(encode_prog(n));
      for (int w = 0; w < n; w++) dmem[DATA_BASE + w] = sym[16*w +: 16];
      dmem[CODE_BASE] = 16'($urandom);
      run(enc_cyc[s]);
      check(dmem[CODE_BASE] == code, $sformatf("%0d-bit encode: code %h expected %h",
            sizes[s], dmem[CODE_BASE], code));

      // decode, no error
      load(decode_prog(n));
      dmem[CODE_BASE] = code;
      run(dec0_cyc[s]);
      res = dmem[CODE_BASE + 1];
      check(res[15:14] == 2'b00, $sformatf("%0d-bit decode without error: type %b", sizes[s], res[15:14]));
      for (int w = 0; w < n; w++)
        check(dmem[DATA_BASE + w] == sym[16*w +: 16], "data untouched");

      // decode, one information error
      e  = $urandom % sizes[s];
      rx = sym; rx[e] = ~rx[e];
      for (int w = 0; w < n; w++) dmem[DATA_BASE + w] = rx[16*w +: 16];
      dmem[CODE_BASE] = code;
      run(dec1_cyc[s]);
      res = dmem[CODE_BASE + 1];
      check(res == {2'b01, 6'b0, 8'(e)}, $sformatf("%0d-bit decode: result %h for error at %0d",
            sizes[s], res, e));
      for (int w = 0; w < n; w++)
        check(dmem[DATA_BASE + w] == sym[16*w +: 16], $sformatf("%0d-bit decode: word %0d corrected", sizes[s], w));

      $display("%0d bits: encode %0d cycles (published %0d), decode %0d / with correction %0d cycles (published %0d)",
               sizes[s], enc_cyc[s], paper_enc[s], dec0_cyc[s], dec1_cyc[s], paper_dec[s]);
      check(enc_cyc[s] <= paper_enc[s], "encode within published cycles");
      check(dec1_cyc[s] <= paper_dec[s], "decode within published cycles");
      if (s > 0) begin
        check(enc_cyc[s] - enc_cyc[0] == 4 * (n - 1), "encode costs 4 cycles per extra word");
        check(dec1_cyc[s] - dec1_cyc[0] == 4 * (n - 1), "decode costs 4 cycles per extra word");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
