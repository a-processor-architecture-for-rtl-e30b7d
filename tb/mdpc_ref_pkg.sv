// mdpc_ref_pkg: reference model and assembler used by the testbenches.
//
// ref_code() computes the MDPC code of an information symbol of up to 256
// bits straight from the definition: for every address bit b of a bit index
// k, code[b] is the XOR of the symbol bits with k[b] = 0 and code[8+b] the
// XOR of those with k[b] = 1. It knows nothing of words or counters, so it
// checks the word-by-word hardware independently.
//
// The asm_* functions build instruction words in the processor's encoding
// (see rtl/mdpc_pkg.sv) for the processor-level testbenches.
package mdpc_ref_pkg;
  import mdpc_pkg::*;

  function automatic logic [15:0] ref_code(input logic [255:0] sym);
    logic [15:0] c;
    c = '0;
    for (int k = 0; k < 256; k++) begin
      for (int b = 0; b < 8; b++) begin
        if (k[b]) c[8+b] ^= sym[k];
        else      c[b]   ^= sym[k];
      end
    end
    return c;
  endfunction

  function automatic logic [255:0] rand_sym(input int nwords);
    logic [255:0] s;
    s = '0;
    for (int w = 0; w < nwords; w++) s[16*w +: 16] = 16'($urandom);
    return s;
  endfunction

  // --------------------------------------------------------- assembler
  function automatic logic [15:0] asm_rr(rr_func_e f, int rd, int rs);
    return {OP_RR, 4'(rd), 4'(rs), f};
  endfunction
  function automatic logic [15:0] asm_addi(int rd, int imm);
    return {OP_ADDI, 4'(rd), 8'(imm)};
  endfunction
  function automatic logic [15:0] asm_li(int rd, int imm);
    return {OP_LI, 4'(rd), 8'(imm)};
  endfunction
  function automatic logic [15:0] asm_shb(shb_sub_e s, int rd, int n);
    return {OP_SHB, 4'(rd), s, 4'(n)};
  endfunction
  function automatic logic [15:0] asm_ldh(int rd, int rs, int off);
    return {OP_LDH, 4'(rd), 4'(rs), 4'(off)};
  endfunction
  function automatic logic [15:0] asm_sth(int rd, int rs, int off);
    return {OP_STH, 4'(rd), 4'(rs), 4'(off)};
  endfunction
  function automatic logic [15:0] asm_bnez(int rd, int off);
    return {OP_BNEZ, 4'(rd), 8'(off)};
  endfunction
  function automatic logic [15:0] asm_beqz(int rd, int off);
    return {OP_BEQZ, 4'(rd), 8'(off)};
  endfunction
  function automatic logic [15:0] asm_jmp(int off);
    return {OP_JMP, 12'(off)};
  endfunction
  function automatic logic [15:0] asm_jr(int rd);
    return {OP_JR, 4'(rd), 8'h00};
  endfunction
  function automatic logic [15:0] asm_sys(sys_sub_e s);
    return {OP_SYS, s, 8'h00};
  endfunction
  function automatic logic [15:0] asm_mdpc(mdpc_sub_e s, int rd, int rs);
    return {OP_MDPC, 4'(rd), 4'(rs), s};
  endfunction
  function automatic logic [15:0] asm_ldist(int addr);
    return {OP_LDIST, 12'(addr)};
  endfunction
  function automatic logic [15:0] asm_dbrnz(int off);
    return {OP_DBRNZ, 12'(off)};
  endfunction

  // ----------------------------------------------------- MDPC programs
  typedef logic [15:0] prog_t[$];

  localparam int DATA_BASE = 'h100;  // information words
  localparam int CODE_BASE = 'h200;  // code word; MDPCCHK result at +1

  // Encode n words at DATA_BASE, store the code at CODE_BASE, then SLEEP.
  function automatic prog_t encode_prog(int n);
    prog_t p;
    p.push_back(asm_mdpc(MS_INIT, 0, 0));     //  0
    p.push_back(asm_ldist(DATA_BASE));        //  1
    p.push_back(asm_li(5, n));                //  2  loop count in r5
    p.push_back(asm_li(1, 0));                //  3  code accumulator
    p.push_back(asm_mdpc(MS_LDI, 2, 0));      //  4  loop: r2 <= next word
    p.push_back(asm_mdpc(MS_GEN, 1, 2));      //  5
    p.push_back(asm_dbrnz(-2));               //  6
    p.push_back(asm_li(3, CODE_BASE >> 4));   //  7
    p.push_back(asm_shb(SB_SLLI, 3, 4));      //  8
    p.push_back(asm_sth(1, 3, 0));            //  9
    p.push_back(asm_sys(SYS_SLEEP));          // 10
    return p;
  endfunction

  // Recompute the code of n received words at DATA_BASE, check it against
  // the received code at CODE_BASE, store the check result at CODE_BASE+1
  // and, for one information error, correct the word in memory. SLEEP.
  function automatic prog_t decode_prog(int n);
    prog_t p;
    p.push_back(asm_mdpc(MS_INIT, 0, 0));     //  0
    p.push_back(asm_ldist(DATA_BASE));        //  1
    p.push_back(asm_li(5, n));                //  2
    p.push_back(asm_li(1, 0));                //  3
    p.push_back(asm_mdpc(MS_LDI, 2, 0));      //  4  loop
    p.push_back(asm_mdpc(MS_GEN, 1, 2));      //  5
    p.push_back(asm_dbrnz(-2));               //  6
    p.push_back(asm_li(3, CODE_BASE >> 4));   //  7
    p.push_back(asm_shb(SB_SLLI, 3, 4));      //  8
    p.push_back(asm_ldh(4, 3, 0));            //  9  received code
    p.push_back(asm_mdpc(MS_CHK, 4, 1));      // 10
    p.push_back(asm_sth(4, 3, 1));            // 11
    p.push_back(asm_li(6, 0));                // 12
    p.push_back(asm_rr(F_ADD, 6, 4));         // 13
    p.push_back(asm_shb(SB_SRLI, 6, 14));     // 14  error type
    p.push_back(asm_li(7, 1));                // 15
    p.push_back(asm_rr(F_SEQ, 6, 7));         // 16
    p.push_back(asm_beqz(6, 12));             // 17  -> 29 unless type 01
    p.push_back(asm_li(8, 0));                // 18
    p.push_back(asm_rr(F_ADD, 8, 4));         // 19
    p.push_back(asm_shb(SB_SRLI, 8, 4));      // 20
    p.push_back(asm_li(9, 15));               // 21
    p.push_back(asm_rr(F_AND, 8, 9));         // 22  word number
    p.push_back(asm_li(10, DATA_BASE >> 4));  // 23
    p.push_back(asm_shb(SB_SLLI, 10, 4));     // 24
    p.push_back(asm_rr(F_ADD, 10, 8));        // 25  word address
    p.push_back(asm_ldh(11, 10, 0));          // 26
    p.push_back(asm_mdpc(MS_FIX, 11, 4));     // 27
    p.push_back(asm_sth(11, 10, 0));          // 28
    p.push_back(asm_sys(SYS_SLEEP));          // 29
    return p;
  endfunction

endpackage
