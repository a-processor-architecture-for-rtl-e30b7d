// mdpc_pkg: types and constants shared by the MDPC processor.
//
// The processor is a 16-bit load/store machine whose base operations are the
// classes listed for the base core (arithmetic, logical, comparison,
// immediate, bit, load/store, branch, jump, interrupt, special) extended with
// the MDPC instructions MDPCGEN, MDPCCHK, MDPCFIX, MDPCINIT, LDI, LDIST and
// DBRNZ. The operation set follows the source design; the 16-bit instruction
// encoding below is this design's own, because no bit fields were published.
//
// Instruction formats (all 16 bits, bits [15:12] are the major opcode):
//   RR    : op | rd[11:8] | rs[7:4] | func[3:0]      rd <= rd func rs
//   RI8   : op | rd[11:8] | imm8[7:0]                ADDI, LI, BNEZ, BEQZ
//   RSUB  : op | rd[11:8] | sub[7:4] | n[3:0]        shift / bit by constant
//   MEM   : op | rd[11:8] | rs[7:4] | off4[3:0]      address = rs + off4
//   I12   : op | imm12[11:0]                         JMP, LDIST, DBRNZ
//   SYS   : op | sub[11:8] | 8'h00                   NOP, SLEEP, TRAP, RETI
//   MDPC  : op | rd[11:8] | rs[7:4] | sub[3:0]       custom MDPC operations
package mdpc_pkg;

  localparam int unsigned XLEN = 16;
  typedef logic [XLEN-1:0] word_t;

  // major opcodes
  typedef enum logic [3:0] {
    OP_RR    = 4'h0,
    OP_ADDI  = 4'h1,
    OP_LI    = 4'h2,
    OP_SHB   = 4'h3,  // shift / bit operation by constant
    OP_LDH   = 4'h4,
    OP_STH   = 4'h5,
    OP_BNEZ  = 4'h6,
    OP_BEQZ  = 4'h7,
    OP_JMP   = 4'h8,
    OP_JR    = 4'h9,
    OP_SYS   = 4'hA,
    OP_MDPC  = 4'hB,
    OP_LDIST = 4'hC,
    OP_DBRNZ = 4'hD
  } opcode_e;

  // func field of OP_RR
  typedef enum logic [3:0] {
    F_ADD  = 4'h0,
    F_SUB  = 4'h1,
    F_AND  = 4'h2,
    F_OR   = 4'h3,
    F_XOR  = 4'h4,
    F_NOT  = 4'h5,
    F_SLL  = 4'h6,
    F_SRL  = 4'h7,
    F_SRA  = 4'h8,
    F_SEQ  = 4'h9,
    F_SNE  = 4'hA,
    F_SLTU = 4'hB
  } rr_func_e;

  // sub field of OP_SHB
  typedef enum logic [3:0] {
    SB_SLLI = 4'h0,
    SB_SRLI = 4'h1,
    SB_BSET = 4'h2,
    SB_BCLR = 4'h3,
    SB_BTST = 4'h4
  } shb_sub_e;

  // sub field of OP_SYS (bits [11:8])
  typedef enum logic [3:0] {
    SYS_NOP   = 4'h0,
    SYS_SLEEP = 4'h1,
    SYS_TRAP  = 4'h2,
    SYS_RETI  = 4'h3
  } sys_sub_e;

  // sub field of OP_MDPC (bits [3:0])
  typedef enum logic [3:0] {
    MS_GEN  = 4'h0,
    MS_CHK  = 4'h1,
    MS_FIX  = 4'h2,
    MS_INIT = 4'h3,
    MS_LDI  = 4'h4
  } mdpc_sub_e;

  // operations of the ALU
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOT,
    ALU_SEQ, ALU_SNE, ALU_SLTU, ALU_BSET, ALU_BCLR, ALU_BTST, ALU_PASSB
  } alu_op_e;

  // operations of the barrel shifter
  typedef enum logic [1:0] {
    SH_SLL, SH_SRL, SH_SRA
  } shift_op_e;

  // operations of the MDPC generator unit
  typedef enum logic [2:0] {
    MDPC_NONE, MDPC_GEN, MDPC_CHK, MDPC_FIX, MDPC_INIT
  } mdpc_op_e;

  // MDPCCHK error types, result bits [15:14]
  typedef enum logic [1:0] {
    ERR_NONE = 2'b00,
    ERR_INFO = 2'b01,  // one error in the information part
    ERR_CODE = 2'b10,  // one error in the code (parity) part
    ERR_MULTI = 2'b11  // two or more errors
  } err_type_e;

  localparam logic [15:0] NOP_INSN = {OP_SYS, SYS_NOP, 8'h00};

endpackage
