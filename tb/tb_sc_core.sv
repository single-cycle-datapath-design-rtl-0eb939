// tb_sc_core: runs the processor core with a 1024-word dual-port memory in
// lockstep with the instruction-set model of tb_sc_pkg.
// First the directed program: checks the values it computes, and that it
// reaches its final instruction after exactly 30 clock cycles (one instruction
// per cycle). Then random programs that fill the whole memory with random
// instructions and data (the upper opcode bits are mostly 10, so most words
// are valid instructions; branches go anywhere, loops included). Each cycle,
// shortly before the falling edge that ends the instruction, the PC,
// instruction, register write and store are compared with the model. Every
// instruction kind, taken and not-taken branches and backward branches must
// have occurred.
module tb_sc_core;
  import sc_pkg::*;
  import tb_sc_pkg::*;

  localparam int unsigned AWS = 10;
  localparam int unsigned N   = 1 << AWS;

  logic   clk = 1'b0, rst;
  word_t  imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata, pc, instr, rf_wdata;
  logic   imem_oe, dmem_we, dmem_oe, rf_we;
  raddr_t rf_waddr;
  int checks = 0, failures = 0;
  int kinds [K_N];

  always #5 clk = ~clk;   // rising edges at 5, 15, ...; falling edges at 10, 20, ...

  sc_core dut (
    .clk(clk), .rst(rst),
    .imem_addr(imem_addr), .imem_oe(imem_oe), .imem_rdata(imem_rdata),
    .dmem_addr(dmem_addr), .dmem_we(dmem_we), .dmem_oe(dmem_oe), .dmem_wdata(dmem_wdata),
    .dmem_rdata(dmem_rdata),
    .pc(pc), .instr(instr), .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata));

  dual_port_mem #(.MEM_AW(AWS)) mem (
    .clk(clk), .cs(1'b1),
    .addr1(imem_addr), .we1(1'b0), .oe1(imem_oe), .data1_in('0), .data1_out(imem_rdata),
    .addr2(dmem_addr), .we2(dmem_we), .oe2(dmem_oe), .data2_in(dmem_wdata), .data2_out(dmem_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic load(sc_model m, input word_t w [N]);
    for (int i = 0; i < N; i++) begin mem.mem[i] = w[i]; m.wr(word_t'(i), w[i]); end
  endtask

  task automatic do_reset();
    rst = 1'b1;
    @(negedge clk); @(negedge clk); #1 rst = 1'b0;
  endtask

  // One instruction: compare just before the falling edge that retires it.
  task automatic run_cycle(sc_model m);
    logic e_we, e_mwe; raddr_t e_wa; word_t e_wd, e_ma, e_md, e_pc, e_ins;
    kind_e k;
    // A store into the word of the store instruction itself is outside what
    // the core supports: replace such an instruction by a no-op first.
    e_ins = m.rd(m.pc);
    if (e_ins[31:26] == OP_SW && (((m.regs[e_ins[20:16]] + word_t'(e_ins[10:6])) & m.mask) == (m.pc & m.mask))) begin
      m.wr(m.pc, '0);
      mem.mem[m.pc[AWS-1:0]] = '0;
    end
    e_pc = m.pc; e_ins = m.rd(m.pc);
    k = m.step(e_we, e_wa, e_wd, e_mwe, e_ma, e_md);
    kinds[k]++;
    if (k == K_BEQ_TAKEN && e_ins[10]) kinds[K_BACK]++;
    @(posedge clk); #4;
    check(pc == e_pc && instr == e_ins, $sformatf("pc %h instr %h, expected %h %h", pc, instr, e_pc, e_ins));
    check(rf_we == e_we && (!e_we || (rf_waddr == e_wa && rf_wdata == e_wd)),
          $sformatf("reg write %b r%0d=%h, expected %b r%0d=%h", rf_we, rf_waddr, rf_wdata, e_we, e_wa, e_wd));
    check(!e_mwe || (mem.mem[e_ma[AWS-1:0]] == e_md), "store not in memory after rising edge");
    check(dmem_we == e_mwe && (!e_mwe || (dmem_addr == e_ma && dmem_wdata == e_md)),
          $sformatf("store %b [%h]=%h, expected %b [%h]=%h", dmem_we, dmem_addr, dmem_wdata, e_mwe, e_ma, e_md));
    @(negedge clk);
  endtask

  function automatic word_t rand_instr();
    int r = $urandom % 100;
    int rs = $urandom % 8, rt = $urandom % 8, rdn = $urandom % 8;
    if (r < 15) return enc_r(OP_ADD, rs, rt, rdn);
    if (r < 28) return enc_r(OP_SUB, rs, rt, rdn);
    if (r < 43) return enc_m(OP_LW, rs, rt, $urandom % 32);
    if (r < 58) return enc_m(OP_SW, rs, rt, $urandom % 32);
    if (r < 75) return enc_m(OP_BEQ, rs, rt, $urandom % 32);
    if (r < 95) return enc_li(rs, (r < 85) ? ($urandom % N) : $urandom);
    return $urandom;
  endfunction

  initial begin
    word_t  img [N];
    word_t  prog [$];
    sc_model m;
    int     cyc;
    foreach (kinds[i]) kinds[i] = 0;
    rst = 1'b1;

    // ------------------------------------------------------ directed program
    directed_program(prog);
    foreach (img[i]) img[i] = '0;
    foreach (prog[i]) img[i] = prog[i];
    img[200] = 32'hDEAD_BEEF;
    m = new(AWS);
    load(m, img);
    do_reset();
    cyc = 0;
    while (m.pc != 23 && cyc < 100) begin run_cycle(m); cyc++; end
    #1;
    check(cyc == 30, $sformatf("directed program took %0d cycles, expected 30", cyc));
    check(pc == 23, "directed program reached its last instruction");
    repeat (3) run_cycle(m);
    #1;
    check(dut.u_rf.regs[3] == 8 && dut.u_rf.regs[4] == 2 && dut.u_rf.regs[5] == 32'hFFFF_FFFE,
          "ADD/SUB results");
    check(dut.u_rf.regs[7] == 8 && mem.mem[104] == 8, "SW then LW");
    check(dut.u_rf.regs[8] == 0, "instruction after taken branch skipped");
    check(dut.u_rf.regs[9] == 4 && mem.mem[100] == 4, "loop ran four times");
    check(dut.u_rf.regs[13] == 32'h001F_FFFF, "21-bit immediate");
    check(dut.u_rf.regs[15] == 32'hDEAD_BEEF, "load of preloaded word");
    check(dut.u_rf.regs[16] == 32'hDEAD_BEEF + 32'h1F_FFFF, "add of loaded word");
    for (int i = 0; i < 32; i++) check(dut.u_rf.regs[i] == m.regs[i], $sformatf("final r%0d", i));

    // ------------------------------------------------------- random programs
    for (int p = 0; p < 20; p++) begin
      foreach (img[i]) img[i] = rand_instr();
      m = new(AWS);
      load(m, img);
      do_reset();
      repeat (300) run_cycle(m);
      #1;
      for (int i = 0; i < 32; i++) check(dut.u_rf.regs[i] == m.regs[i], $sformatf("prog %0d final r%0d", p, i));
    end

    foreach (kinds[i]) begin
      $display("kind %s: %0d", kind_e'(i), kinds[i]);
      check(kinds[i] > 0, $sformatf("%s never happened", kind_e'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
