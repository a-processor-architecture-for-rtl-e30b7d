// mdpc_asip: 16-bit processor with custom instructions for multi-dimensional
// parity check (MDPC) codes -- top level.
//
// A small load/store core (16 registers of 16 bits, word-addressed
// instruction and data memories outside the core) whose base operations are
// extended with:
//   MDPCINIT            clear the 4-bit word counter
//   MDPCGEN  rd, rs     rd <= code rd updated with information word rs,
//                       counter + 1 (see mdpc_gen)
//   MDPCCHK  rd, rs     rd <= error type [15:14] and position [7:0] from
//                       received code rd and recomputed code rs
//   MDPCFIX  rd, rs     rd <= rd with bit rs[3:0] inverted
//   LDIST    imm12      LDIREG <= imm12
//   LDI      rd         rd <= dmem[LDIREG], LDIREG <= LDIREG + 1
//   DBRNZ    imm12      r5 <= r5 - 1; if r5 - 1 != 0: PC <= PC + imm12
// so that an n-word symbol is encoded by the loop {LDI; MDPCGEN; DBRNZ}.
//
// Pipeline: two stages. Fetch (pc_unit, imau) reads the instruction at PC
// into IR; execute decodes IR, reads the registers, computes in the ALU,
// barrel shifter, adder or MDPC generator, accesses data memory through the
// DMAU and writes the register back, all in one cycle. A taken branch,
// jump, DBRNZ, TRAP, RETI or interrupt squashes the instruction already in
// fetch, so it costs two cycles; everything else takes one. SLEEP stops
// fetching until `irq`. TRAP and an accepted `irq` save a return address
// in EPC and jump to TRAP_VECTOR / IRQ_VECTOR; RETI returns. Interrupts are
// not accepted again until RETI. An irq replaces the instruction in IR,
// which is re-executed after RETI.
//
// Memory interfaces: imem_addr -> imem_rdata and dmem_addr -> dmem_rdata are
// combinational reads in the same cycle; dmem_we writes dmem_wdata at the
// clock edge. Reset is synchronous, active low.
//
// The block structure (PC, IMAU, IR, GPR, ALU, MDPC Generator with 4-bit
// counter, barrel shifter, adder, DMAU, LDI_REG) and the semantics of the
// custom instructions follow the source design. The instruction encoding
// (mdpc_pkg), the pipeline depth, the memory interface and the interrupt
// details are this design's own.
module mdpc_asip
  import mdpc_pkg::*;
#(
  parameter int unsigned IMEM_AW     = 12,
  parameter int unsigned DMEM_AW     = 12,
  parameter word_t       TRAP_VECTOR = 16'h0010,
  parameter word_t       IRQ_VECTOR  = 16'h0020
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic [IMEM_AW-1:0] imem_addr,
  input  word_t              imem_rdata,
  output logic [DMEM_AW-1:0] dmem_addr,
  output logic               dmem_re,
  output logic               dmem_we,
  output word_t              dmem_wdata,
  input  word_t              dmem_rdata,
  input  logic               irq,
  output logic               irq_ack,
  output logic               sleeping,
  output logic               retired
);

  // ---------------------------------------------------------------- fetch
  word_t pc, ir, ir_pc;
  logic  ir_valid;
  logic  redirect, flush, hold;
  word_t target;

  pc_unit u_pc (
    .clk      (clk),
    .rst_n    (rst_n),
    .hold     (hold),
    .redirect (redirect),
    .target   (target),
    .pc       (pc)
  );

  imau #(.AW(IMEM_AW)) u_imau (
    .clk        (clk),
    .rst_n      (rst_n),
    .pc         (pc),
    .fetch_en   (!hold),
    .flush      (flush),
    .imem_addr  (imem_addr),
    .imem_rdata (imem_rdata),
    .ir         (ir),
    .ir_pc      (ir_pc),
    .ir_valid   (ir_valid)
  );

  // --------------------------------------------------------------- decode
  opcode_e    opc;
  logic [3:0] f_rd, f_rs, f_lo;
  word_t      simm8, simm12, zimm12, zimm4;

  always_comb begin
    opc    = opcode_e'(ir[15:12]);
    f_rd   = ir[11:8];
    f_rs   = ir[7:4];
    f_lo   = ir[3:0];
    simm8  = {{8{ir[7]}}, ir[7:0]};
    simm12 = {{4{ir[11]}}, ir[11:0]};
    zimm12 = {4'h0, ir[11:0]};
    zimm4  = {12'h000, ir[3:0]};
  end

  // ------------------------------------------------------------ registers
  logic [3:0] ra, rb;
  word_t      rd_val, rs_val;
  logic       wb_en;
  word_t      wb_data;

  assign ra = (opc == OP_DBRNZ) ? 4'd5 : f_rd;
  assign rb = f_rs;

  gpr #(.NREGS(16)) u_gpr (
    .clk   (clk),
    .rst_n (rst_n),
    .ra    (ra),
    .rb    (rb),
    .da    (rd_val),
    .db    (rs_val),
    .we    (wb_en),
    .wa    (ra),
    .wd    (wb_data)
  );

  // ------------------------------------------------------ execution units
  alu_op_e    alu_op;
  word_t      alu_b, alu_y;
  shift_op_e  sh_op;
  logic [3:0] sh_amt;
  word_t      sh_y;
  mdpc_op_e   mdpc_op;
  word_t      mdpc_y;
  logic [3:0] mdpc_count;
  word_t      add_a, add_b, add_y;

  asip_alu u_alu (.op(alu_op), .a(rd_val), .b(alu_b), .y(alu_y));

  barrel_shifter u_shifter (.op(sh_op), .a(rd_val), .sh(sh_amt), .y(sh_y));

  asip_adder u_adder (.a(add_a), .b(add_b), .y(add_y));

  mdpc_unit u_mdpc (
    .clk    (clk),
    .rst_n  (rst_n),
    .op     (mdpc_op),
    .rd_val (rd_val),
    .rs_val (rs_val),
    .result (mdpc_y),
    .count  (mdpc_count)
  );

  // ------------------------------------------------------ LDI and memory
  logic  ldi_set, ldi_inc;
  word_t ldi_addr;
  logic  do_ld, do_st, do_ldi;
  word_t ld_data;

  ldi_reg #(.WIDTH(16)) u_ldi_reg (
    .clk     (clk),
    .rst_n   (rst_n),
    .set     (ldi_set),
    .set_val (zimm12),
    .inc     (ldi_inc),
    .addr    (ldi_addr)
  );

  dmau #(.AW(DMEM_AW)) u_dmau (
    .ld        (do_ld),
    .st        (do_st),
    .ldi       (do_ldi),
    .ea        (add_y),
    .ldi_addr  (ldi_addr),
    .st_data   (rd_val),
    .mem_addr  (dmem_addr),
    .mem_re    (dmem_re),
    .mem_we    (dmem_we),
    .mem_wdata (dmem_wdata),
    .mem_rdata (dmem_rdata),
    .ld_data   (ld_data)
  );

  // ------------------------------------------------- interrupt / sleep state
  logic  in_handler, sleep_q;
  word_t epc;
  logic  take_irq, exec;
  logic  do_trap, do_reti, do_sleep;

  assign take_irq = irq && !in_handler && (ir_valid || sleep_q);
  assign exec     = ir_valid && !take_irq;

  // ------------------------------------------------------------- control
  typedef enum logic [1:0] {WB_ALU, WB_SHIFT, WB_MDPC, WB_LOAD} wb_sel_e;
  wb_sel_e wb_sel;
  logic    branch_taken;

  always_comb begin
    wb_en        = 1'b0;
    wb_sel       = WB_ALU;
    alu_op       = ALU_ADD;
    alu_b        = rs_val;
    sh_op        = SH_SLL;
    sh_amt       = rs_val[3:0];
    mdpc_op      = MDPC_NONE;
    add_a        = ir_pc;
    add_b        = simm8;
    do_ld        = 1'b0;
    do_st        = 1'b0;
    do_ldi       = 1'b0;
    ldi_set      = 1'b0;
    ldi_inc      = 1'b0;
    branch_taken = 1'b0;
    target       = add_y;
    do_trap      = 1'b0;
    do_reti      = 1'b0;
    do_sleep     = 1'b0;

    if (exec) begin
      unique case (opc)
        OP_RR: begin
          wb_en = 1'b1;
          unique case (rr_func_e'(f_lo))
            F_ADD:  alu_op = ALU_ADD;
            F_SUB:  alu_op = ALU_SUB;
            F_AND:  alu_op = ALU_AND;
            F_OR:   alu_op = ALU_OR;
            F_XOR:  alu_op = ALU_XOR;
            F_NOT:  alu_op = ALU_NOT;
            F_SLL:  begin wb_sel = WB_SHIFT; sh_op = SH_SLL; end
            F_SRL:  begin wb_sel = WB_SHIFT; sh_op = SH_SRL; end
            F_SRA:  begin wb_sel = WB_SHIFT; sh_op = SH_SRA; end
            F_SEQ:  alu_op = ALU_SEQ;
            F_SNE:  alu_op = ALU_SNE;
            F_SLTU: alu_op = ALU_SLTU;
            default: wb_en = 1'b0;  // undefined function: no effect
          endcase
        end
        OP_ADDI: begin wb_en = 1'b1; alu_op = ALU_ADD;   alu_b = simm8; end
        OP_LI:   begin wb_en = 1'b1; alu_op = ALU_PASSB; alu_b = simm8; end
        OP_SHB: begin
          wb_en  = 1'b1;
          sh_amt = f_lo;
          alu_b  = zimm4;
          unique case (shb_sub_e'(f_rs))
            SB_SLLI: begin wb_sel = WB_SHIFT; sh_op = SH_SLL; end
            SB_SRLI: begin wb_sel = WB_SHIFT; sh_op = SH_SRL; end
            SB_BSET: alu_op = ALU_BSET;
            SB_BCLR: alu_op = ALU_BCLR;
            SB_BTST: alu_op = ALU_BTST;
            default: wb_en = 1'b0;
          endcase
        end
        OP_LDH: begin
          wb_en = 1'b1; wb_sel = WB_LOAD; do_ld = 1'b1;
          add_a = rs_val; add_b = zimm4;
        end
        OP_STH: begin
          do_st = 1'b1;
          add_a = rs_val; add_b = zimm4;
        end
        OP_BNEZ: branch_taken = (rd_val != '0);
        OP_BEQZ: branch_taken = (rd_val == '0);
        OP_JMP:  begin branch_taken = 1'b1; add_b = simm12; end
        OP_JR:   begin branch_taken = 1'b1; target = rd_val; end
        OP_SYS: begin
          unique case (sys_sub_e'(f_rd))
            SYS_SLEEP: do_sleep = 1'b1;
            SYS_TRAP:  begin do_trap = 1'b1; add_b = 16'd1; target = TRAP_VECTOR; end
            SYS_RETI:  begin do_reti = 1'b1; target = epc; end
            default: ;
          endcase
        end
        OP_MDPC: begin
          unique case (mdpc_sub_e'(f_lo))
            MS_GEN:  begin mdpc_op = MDPC_GEN; wb_en = 1'b1; wb_sel = WB_MDPC; end
            MS_CHK:  begin mdpc_op = MDPC_CHK; wb_en = 1'b1; wb_sel = WB_MDPC; end
            MS_FIX:  begin mdpc_op = MDPC_FIX; wb_en = 1'b1; wb_sel = WB_MDPC; end
            MS_INIT: mdpc_op = MDPC_INIT;
            MS_LDI:  begin
              do_ldi = 1'b1; ldi_inc = 1'b1;
              wb_en  = 1'b1; wb_sel  = WB_LOAD;
            end
            default: ;
          endcase
        end
        OP_LDIST: ldi_set = 1'b1;
        OP_DBRNZ: begin
          // r5 <= r5 - 1, branch while the new value is non-zero
          wb_en = 1'b1; alu_op = ALU_SUB; alu_b = 16'd1;
          add_b = simm12;
          branch_taken = (alu_y != '0);
        end
        default: ;
      endcase
    end

    if (take_irq) target = IRQ_VECTOR;
  end

  always_comb begin
    unique case (wb_sel)
      WB_SHIFT: wb_data = sh_y;
      WB_MDPC:  wb_data = mdpc_y;
      WB_LOAD:  wb_data = ld_data;
      default:  wb_data = alu_y;
    endcase
  end

  assign redirect = branch_taken || do_trap || do_reti || take_irq;
  assign flush    = redirect || do_sleep;
  assign hold     = (sleep_q || do_sleep) && !redirect;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_handler <= 1'b0;
      sleep_q    <= 1'b0;
      epc        <= '0;
    end else begin
      if (take_irq) begin
        in_handler <= 1'b1;
        sleep_q    <= 1'b0;
        epc        <= sleep_q ? pc : ir_pc;
      end else if (do_trap) begin
        in_handler <= 1'b1;
        epc        <= add_y;          // address after the TRAP
      end else if (do_reti) begin
        in_handler <= 1'b0;
      end else if (do_sleep) begin
        sleep_q    <= 1'b1;
      end
    end
  end

  assign irq_ack  = take_irq;
  assign sleeping = sleep_q;
  assign retired  = exec;

  // the data memory is never read and written in the same cycle
  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n) !(dmem_re && dmem_we));
  // MDPCINIT leaves the word counter at zero for the next MDPCGEN
  a_init: assert property (@(posedge clk) disable iff (!rst_n)
                           (mdpc_op == MDPC_INIT) |=> (mdpc_count == 4'd0));
  // a redirect always discards the instruction being fetched
  a_flush: assert property (@(posedge clk) disable iff (!rst_n) redirect |-> flush);

endmodule
