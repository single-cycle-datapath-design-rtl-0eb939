// tb_sc_pkg: testbench helpers for the single-cycle processor: instruction
// encoders, a directed test program, and an instruction-set reference model
// that executes one instruction per call, independently of the RTL.
package tb_sc_pkg;
  import sc_pkg::*;

  function automatic word_t enc_r(opcode_e op, int rs, int rt, int rd);
    return {op, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'd0};
  endfunction
  function automatic word_t enc_m(opcode_e op, int rs, int rt, int idx);
    return {op, 5'(rs), 5'(rt), 5'd0, 5'(idx), 6'd0};
  endfunction
  function automatic word_t enc_li(int rs, int imm);
    return {OP_LI, 5'(rs), 21'(imm)};
  endfunction

  // Kinds of executed instruction, for coverage counting.
  typedef enum int {K_ADD, K_SUB, K_LW, K_SW, K_BEQ_TAKEN, K_BEQ_NOT, K_LI, K_NOP, K_BACK, K_N} kind_e;

  // Directed program: arithmetic, loads and stores, taken, not-taken and
  // backward branches, a 21-bit immediate, then a branch-to-self at the end.
  // Word 200 is preloaded with 32'hDEAD_BEEF.
  function automatic void directed_program(ref word_t prog[$]);
    prog = {};
    prog.push_back(enc_li(1, 5));                // 0  r1 = 5
    prog.push_back(enc_li(2, 3));                // 1  r2 = 3
    prog.push_back(enc_r(OP_ADD, 3, 1, 2));      // 2  r3 = r1 + r2 = 8
    prog.push_back(enc_r(OP_SUB, 4, 1, 2));      // 3  r4 = r1 - r2 = 2
    prog.push_back(enc_r(OP_SUB, 5, 2, 1));      // 4  r5 = r2 - r1 = -2
    prog.push_back(enc_li(6, 100));              // 5  r6 = 100
    prog.push_back(enc_m(OP_SW, 3, 6, 4));       // 6  mem[104] = r3
    prog.push_back(enc_m(OP_LW, 7, 6, 4));       // 7  r7 = mem[104] = 8
    prog.push_back(enc_m(OP_BEQ, 7, 3, 2));      // 8  r7 == r3: go to 10
    prog.push_back(enc_li(8, 12'hBAD));          // 9  skipped
    prog.push_back(enc_m(OP_BEQ, 1, 2, 5));      // 10 r1 != r2: fall through
    prog.push_back(enc_li(9, 0));                // 11 r9 = 0
    prog.push_back(enc_li(10, 1));               // 12 r10 = 1
    prog.push_back(enc_li(11, 4));               // 13 r11 = 4
    prog.push_back(enc_r(OP_ADD, 9, 9, 10));     // 14 loop: r9 = r9 + 1
    prog.push_back(enc_m(OP_BEQ, 9, 11, 2));     // 15 r9 == 4: go to 17
    prog.push_back(enc_m(OP_BEQ, 0, 0, -2));     // 16 back to 14
    prog.push_back(enc_m(OP_SW, 9, 6, 0));       // 17 mem[100] = 4
    prog.push_back(enc_li(13, 21'h1F_FFFF));     // 18 r13 = 0x1FFFFF
    prog.push_back(enc_li(14, 190));             // 19 r14 = 190
    prog.push_back(enc_m(OP_LW, 15, 14, 10));    // 20 r15 = mem[200]
    prog.push_back(enc_r(OP_ADD, 16, 15, 13));   // 21 r16 = r15 + r13
    prog.push_back(32'h0000_0000);               // 22 undefined opcode: no-op
    prog.push_back(enc_m(OP_BEQ, 0, 0, 0));      // 23 halt: branch to self
  endfunction

  class sc_model;
    word_t regs [32];
    word_t mem [int unsigned];
    word_t pc;
    int unsigned mask;

    function new(int unsigned mem_aw);
      mask = (mem_aw >= 32) ? 32'hFFFF_FFFF : ((32'd1 << mem_aw) - 1);
      foreach (regs[i]) regs[i] = '0;
      pc = '0;
    endfunction

    function word_t rd(word_t a);
      return mem.exists(a & mask) ? mem[a & mask] : '0;
    endfunction

    function void wr(word_t a, word_t d);
      mem[a & mask] = d;
    endfunction

    // Execute one instruction; report its register and memory writes.
    function kind_e step(output logic rf_we, output raddr_t rf_wa, output word_t rf_wd,
                         output logic m_we, output word_t m_a, output word_t m_d);
      word_t  ins = rd(pc);
      int     rs = ins[25:21], rt = ins[20:16], rdn = ins[15:11];
      word_t  idx = {27'd0, ins[10:6]};
      word_t  br  = {{27{ins[10]}}, ins[10:6]};
      kind_e  k;
      rf_we = 0; rf_wa = raddr_t'(rs); rf_wd = '0; m_we = 0; m_a = '0; m_d = '0;
      k = K_NOP;
      case (ins[31:26])
        6'b100000: begin rf_we = 1; rf_wd = regs[rt] + regs[rdn]; k = K_ADD; end
        6'b100001: begin rf_we = 1; rf_wd = regs[rt] - regs[rdn]; k = K_SUB; end
        6'b100010: begin rf_we = 1; rf_wd = rd(regs[rt] + idx); k = K_LW; end
        6'b100011: begin m_we = 1; m_a = regs[rt] + idx; m_d = regs[rs]; k = K_SW; end
        6'b100100: k = (regs[rs] == regs[rt]) ? K_BEQ_TAKEN : K_BEQ_NOT;
        6'b100101: begin rf_we = 1; rf_wd = {11'd0, ins[20:0]}; k = K_LI; end
        default: ;
      endcase
      if (m_we) wr(m_a, m_d);
      if (rf_we) regs[rs] = rf_wd;
      pc = (k == K_BEQ_TAKEN) ? pc + br : pc + 1;
      return k;
    endfunction
  endclass

endpackage
