// tb_mdpc_asip: end-to-end test of the processor.
//
// Phase A runs a program that exercises every base operation class
// (arithmetic, logical, comparison, shifts, bit operations, load/store,
// immediates, taken and not-taken branches, jumps, indirect jump, TRAP and
// RETI, an interrupt in the middle of a DBRNZ loop, SLEEP and wake-up by
// interrupt, LDIST/LDI) and stores its results to data memory, where they
// are compared with values worked out by hand.
// Phase B runs the MDPC decode program on received words with no error,
// one information error, one code error and two errors, and checks the
// error type, the position and the correction.
// Every mechanism is counted while it happens; one that never happened is
// a failure.
module tb_mdpc_asip;
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

  // ------------------------------------------------ mechanism counters
  typedef enum int {
    M_BRANCH_TAKEN, M_BRANCH_NOT_TAKEN, M_JUMP, M_JR, M_DBRNZ_LOOP, M_DBRNZ_EXIT,
    M_LDI, M_LDIST, M_GEN, M_CHK, M_FIX, M_INIT, M_TRAP, M_RETI, M_IRQ_RUN,
    M_IRQ_WAKE, M_SLEEP, M_LOAD, M_STORE, M_SHIFT, M_BITOP,
    M_ERR00, M_ERR01, M_ERR10, M_ERR11, M_COUNT
  } mech_e;
  int    mech [M_COUNT];
  string mech_name [M_COUNT] = '{"taken branch", "branch not taken", "jump", "indirect jump",
    "DBRNZ loop back", "DBRNZ exit", "LDI", "LDIST", "MDPCGEN", "MDPCCHK", "MDPCFIX", "MDPCINIT",
    "TRAP", "RETI", "interrupt while running", "interrupt wake from SLEEP", "SLEEP", "load",
    "store", "shift", "bit operation", "check type 00", "check type 01", "check type 10",
    "check type 11"};

  always_ff @(posedge clk) begin
    if (rst_n && dut.exec) begin
      case (dut.opc)
        OP_BNEZ, OP_BEQZ: if (dut.branch_taken) mech[M_BRANCH_TAKEN]++; else mech[M_BRANCH_NOT_TAKEN]++;
        OP_JMP:   mech[M_JUMP]++;
        OP_JR:    mech[M_JR]++;
        OP_DBRNZ: if (dut.branch_taken) mech[M_DBRNZ_LOOP]++; else mech[M_DBRNZ_EXIT]++;
        OP_LDIST: mech[M_LDIST]++;
        OP_LDH:   mech[M_LOAD]++;
        OP_STH:   mech[M_STORE]++;
        OP_SHB:   if (dut.f_rs < 2) mech[M_SHIFT]++; else mech[M_BITOP]++;
        OP_RR:    if (dut.f_lo inside {F_SLL, F_SRL, F_SRA}) mech[M_SHIFT]++;
        OP_SYS: case (dut.f_rd)
                  SYS_TRAP:  mech[M_TRAP]++;
                  SYS_RETI:  mech[M_RETI]++;
                  SYS_SLEEP: mech[M_SLEEP]++;
                  default: ;
                endcase
        OP_MDPC: case (dut.f_lo)
                   MS_GEN:  mech[M_GEN]++;
                   MS_CHK: begin
                     mech[M_CHK]++;
                     mech[M_ERR00 + int'(dut.mdpc_y[15:14])]++;
                   end
                   MS_FIX:  mech[M_FIX]++;
                   MS_INIT: mech[M_INIT]++;
                   MS_LDI:  mech[M_LDI]++;
                   default: ;
                 endcase
        default: ;
      endcase
    end
    if (rst_n && irq_ack) begin
      if (sleeping) mech[M_IRQ_WAKE]++; else mech[M_IRQ_RUN]++;
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic reset_core();
    rst_n = 1'b0;
    @(posedge clk); @(posedge clk); #1;
    rst_n = 1'b1;
  endtask

  task automatic wait_sleep(input int limit);
    int c = 0;
    while (!sleeping && c < limit) begin @(posedge clk); #1; c++; end
    check(sleeping, "reached SLEEP");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------- phase A program
  int a;
  task automatic emit(input word_t w);
    imem[a] = w;
    a++;
  endtask

  task automatic build_phase_a();
    int lp, t;
    for (int i = 0; i < 4096; i++) imem[i] = NOP_INSN;
    a = 0;
    emit(asm_jmp('h30));                                   // reset: skip the vectors
    a = 'h10;                                              // TRAP handler
    emit(asm_li(14, 'h77));
    emit(asm_sys(SYS_RETI));
    a = 'h20;                                              // interrupt handler
    emit(asm_addi(0, 1));
    emit(asm_sys(SYS_RETI));
    a = 'h30;
    emit(asm_li(15, 'h30));  emit(asm_shb(SB_SLLI, 15, 4)); // r15 = 0x300
    emit(asm_li(1, 5));      emit(asm_li(2, -3));
    emit(asm_li(3, 0));      emit(asm_rr(F_ADD, 3, 1));  emit(asm_rr(F_ADD, 3, 2));
    emit(asm_sth(3, 15, 0));                               // 0x0002
    emit(asm_li(4, 5));      emit(asm_rr(F_SUB, 4, 2));
    emit(asm_sth(4, 15, 1));                               // 0x0008
    emit(asm_li(5, 'h5A));   emit(asm_li(6, 'h0F));
    emit(asm_rr(F_AND, 5, 6)); emit(asm_rr(F_OR, 5, 2)); emit(asm_rr(F_XOR, 5, 1));
    emit(asm_sth(5, 15, 2));                               // 0xFFFA
    emit(asm_rr(F_NOT, 6, 5));
    emit(asm_sth(6, 15, 3));                               // 0x0005
    emit(asm_li(7, -128));   emit(asm_li(8, 3));  emit(asm_rr(F_SRA, 7, 8));
    emit(asm_sth(7, 15, 4));                               // 0xFFF0
    emit(asm_li(9, 1));      emit(asm_rr(F_SLL, 9, 8));
    emit(asm_sth(9, 15, 5));                               // 0x0008
    emit(asm_rr(F_SEQ, 9, 4));
    emit(asm_sth(9, 15, 6));                               // 0x0001
    emit(asm_rr(F_SLTU, 1, 2));
    emit(asm_sth(1, 15, 7));                               // 0x0001
    emit(asm_li(10, 0));     emit(asm_shb(SB_BSET, 10, 15)); emit(asm_shb(SB_BSET, 10, 3));
    emit(asm_shb(SB_BCLR, 10, 15));
    emit(asm_sth(10, 15, 8));                              // 0x0008
    emit(asm_shb(SB_BTST, 10, 3));
    emit(asm_sth(10, 15, 9));                              // 0x0001
    emit(asm_li(7, -128));   emit(asm_rr(F_SRL, 7, 8));
    emit(asm_sth(7, 15, 14));                              // 0x1FF0
    emit(asm_shb(SB_SRLI, 7, 4)); emit(asm_rr(F_SNE, 7, 8));
    emit(asm_sth(7, 15, 15));                              // 0x0001
    emit(asm_li(11, 0));
    emit(asm_bnez(11, 5));                                 // not taken
    emit(asm_beqz(11, 3));                                 // taken, skips two
    emit(asm_li(12, 'h11));  emit(asm_li(12, 'h12));
    emit(asm_li(12, 'h22));
    emit(asm_sth(12, 15, 10));                             // 0x0022
    emit(asm_bnez(12, 2));                                 // taken
    emit(asm_li(12, 'h33));
    emit(asm_jmp(2));
    emit(asm_li(12, 'h44));
    emit(asm_sth(12, 15, 11));                             // 0x0022
    t = a + 3;
    emit(asm_li(13, t));     emit(asm_jr(13));
    emit(asm_li(12, 'h55));
    emit(asm_sth(12, 15, 12));                             // 0x0022 (at t)
    emit(asm_addi(15, 16));                                // r15 = 0x310
    emit(asm_li(0, 0));      emit(asm_li(14, 0));
    emit(asm_sys(SYS_TRAP));
    emit(asm_sth(14, 15, 0));                              // 0x0077
    emit(asm_li(5, 20));     emit(asm_li(12, 0));
    lp = a;
    emit(asm_addi(12, 3));   emit(asm_dbrnz(-1));
    emit(asm_sth(12, 15, 1));                              // 60 = 0x003C
    emit(asm_sth(0, 15, 2));                               // 1 interrupt so far
    emit(asm_sys(SYS_SLEEP));
    emit(asm_sth(0, 15, 3));                               // 2 after wake-up
    emit(asm_ldist('h300));
    emit(asm_mdpc(MS_LDI, 1, 0)); emit(asm_mdpc(MS_LDI, 2, 0));
    emit(asm_rr(F_ADD, 1, 2));
    emit(asm_sth(1, 15, 4));                               // 2 + 8 = 0x000A
    emit(asm_sys(SYS_SLEEP));
    check(t < 128 && lp < 128, "program fits the immediates");
  endtask

  initial begin
    word_t exp_a [16] = '{16'h0002, 16'h0008, 16'hFFFA, 16'h0005, 16'hFFF0, 16'h0008, 16'h0001,
                          16'h0001, 16'h0008, 16'h0001, 16'h0022, 16'h0022, 16'h0022, 16'h0000,
                          16'h1FF0, 16'h0001};
    word_t exp_b [5] = '{16'h0077, 16'h003C, 16'h0001, 16'h0002, 16'h000A};
    logic [255:0] sym, rx;
    word_t code, rcode, res;
    int n, e1, e2, cb, c;
    prog_t prog;

    irq = 1'b0;
    for (int i = 0; i < 4096; i++) dmem[i] = '0;
    foreach (mech[i]) mech[i] = 0;

    // ------------------------------------------------------- phase A
    build_phase_a();
    reset_core();
    // interrupt in the middle of the DBRNZ loop
    c = 0;
    while (mech[M_DBRNZ_LOOP] < 5 && c < 2000) begin @(posedge clk); #1; c++; end
    irq = 1'b1;
    while (!irq_ack && c < 2000) begin @(posedge clk); #1; c++; end
    @(posedge clk); #1 irq = 1'b0;
    wait_sleep(2000);
    repeat (5) @(posedge clk);
    #1 check(sleeping, "stays asleep without interrupt");
    irq = 1'b1;
    @(posedge clk); #1 irq = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    wait_sleep(2000);
    for (int i = 0; i < 16; i++)
      if (i != 13) check(dmem['h300 + i] == exp_a[i],
                         $sformatf("result %0d: %h expected %h", i, dmem['h300 + i], exp_a[i]));
    for (int i = 0; i < 5; i++)
      check(dmem['h310 + i] == exp_b[i],
            $sformatf("result 0x31%0d: %h expected %h", i, dmem['h310 + i], exp_b[i]));

    // ------------------------------------------------------- phase B
    for (int t = 0; t < 16; t++) begin
      n = 1 << (t % 5);
      sym = rand_sym(n);
      code = ref_code(sym);
      rx = sym; rcode = code;
      e1 = $urandom % (16 * n);
      e2 = (e1 + 1 + $urandom % (16 * n - 1)) % (16 * n);
      cb = $urandom % 16;
      case (t % 4)
        0: ;
        1: rx[e1] = ~rx[e1];
        2: rcode[cb] = ~rcode[cb];
        default: begin rx[e1] = ~rx[e1]; rx[e2] = ~rx[e2]; end
      endcase
      for (int i = 0; i < 4096; i++) imem[i] = NOP_INSN;
      prog = decode_prog(n);
      foreach (prog[i]) imem[i] = prog[i];
      for (int w = 0; w < n; w++) dmem[DATA_BASE + w] = rx[16*w +: 16];
      dmem[CODE_BASE] = rcode;
      reset_core();
      wait_sleep(2000);
      res = dmem[CODE_BASE + 1];
      case (t % 4)
        0: check(res == 16'h0000, $sformatf("no error: %h", res));
        1: check(res == {2'b01, 6'b0, 8'(e1)}, $sformatf("info error at %0d: %h", e1, res));
        2: check(res[15:14] == 2'b10, $sformatf("code error: %h", res));
        default: check(res[15:14] == 2'b11, $sformatf("two errors: %h", res));
      endcase
      for (int w = 0; w < n; w++)
        check(dmem[DATA_BASE + w] == ((t % 4 == 1) ? sym[16*w +: 16] : rx[16*w +: 16]),
              $sformatf("data word %0d after decode", w));
    end

    foreach (mech[i]) begin
      $display("%-28s %0d", mech_name[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism '%s' happened", mech_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
