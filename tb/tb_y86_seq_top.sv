// tb_y86_seq_top: end-to-end test of y86_seq_top at its default parameters.
//
// Every machine gets a program through its load port during one shared
// reset, then all run together:
//   seq     main calls a subroutine that sums 5+4+3+2+1 in a loop with
//           addq, pushq/popq, subq, cmovg and jne, returns, then stores the
//           sum with rmmovq, reads it back with mrmovq and halts (39 cycles)
//   mov     the irmovq/rmmovq/rrmovq/mrmovq example sequence (8 cycles)
//   add     three additions then an unknown instruction: STAT_INS (4 cycles)
//   nopjmp  the nop/jmp example program (7 cycles)
//   nophalt five nops and a halt (6 cycles)
//   nop     never stops; its PC must equal the cycle count
//   count   must equal the cycle count
// Final registers, memory words, PCs, statuses and cycle counts are checked
// against values worked out by hand.  Each mechanism (taken and untaken
// branch, taken and untaken cmov, call, ret, push, pop, memory read and
// write, halt stop, invalid-instruction stop) is counted while the machines
// run, and one that never happens counts as a failure.
module tb_y86_seq_top;
  import y86_pkg::*;
  localparam int unsigned N = 8192;   // default memory size of the top
  logic clk = 0, rst = 1;
  mem_load_t seq_load = '0, mov_load = '0, add_load = '0;
  mem_load_t nopjmp_load = '0, nophalt_load = '0, nop_load = '0;
  word_t seq_pc, mov_pc, add_pc, nopjmp_pc, nophalt_pc, nop_pc, count;
  stat_e seq_stat, mov_stat, add_stat, nopjmp_stat, nophalt_stat, nop_stat;
  iword_t nop_i10bytes;
  int checks = 0, failures = 0;

  logic [7:0] p_seq [N], p_mov [N], p_add [N], p_jmp [N], p_halt [N], p_nop [N];

  y86_seq_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // byte writer for the program images
  function automatic void put(ref logic [7:0] img [N], input int at, input logic [7:0] b [$]);
    foreach (b[i]) img[at + i] = b[i];
  endfunction
  function automatic void put64(ref logic [7:0] img [N], input int at, input word_t v);
    for (int k = 0; k < 8; k++) img[at + k] = v[8*k +: 8];
  endfunction

  // mechanism counters
  int m_jtaken, m_jnot, m_cmov_t, m_cmov_n, m_call, m_ret, m_push, m_pop, m_rd, m_wr;
  int m_hlt, m_ins;
  int cyc_seq, cyc_mov, cyc_add, cyc_jmp, cyc_halt;

  always @(negedge clk) if (!rst) begin
    if (dut.u_seq.commit) begin
      case (dut.u_seq.ins.icode)
        I_JXX:    if (dut.u_seq.cnd) m_jtaken++; else m_jnot++;
        I_RRMOVQ: if (dut.u_seq.cnd) m_cmov_t++; else m_cmov_n++;
        I_CALL:   m_call++;
        I_RET:    m_ret++;
        I_PUSHQ:  m_push++;
        I_POPQ:   m_pop++;
        default: ;
      endcase
      if (dut.u_seq.mem_readbit)  m_rd++;
      if (dut.u_seq.mem_writebit) m_wr++;
    end
    if (seq_stat == STAT_AOK)     cyc_seq++;
    if (mov_stat == STAT_AOK)     cyc_mov++;
    if (add_stat == STAT_AOK)     cyc_add++;
    if (nopjmp_stat == STAT_AOK)  cyc_jmp++;
    if (nophalt_stat == STAT_AOK) cyc_halt++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    foreach (p_seq[i]) begin
      p_seq[i] = 0; p_mov[i] = 0; p_add[i] = 0; p_jmp[i] = 0; p_halt[i] = 0; p_nop[i] = 0;
    end
    // ---- seq program
    put(p_seq, 16'h00, '{8'h30, 8'hF4}); put64(p_seq, 16'h02, 64'h3F8);   // irmovq $0x3f8,%rsp
    put(p_seq, 16'h0a, '{8'h30, 8'hF7}); put64(p_seq, 16'h0c, 64'd5);     // irmovq $5,%rdi
    put(p_seq, 16'h14, '{8'h80});        put64(p_seq, 16'h15, 64'h32);    // call f
    put(p_seq, 16'h1d, '{8'h40, 8'h0F}); put64(p_seq, 16'h1f, 64'h200);   // rmmovq %rax,0x200
    put(p_seq, 16'h27, '{8'h50, 8'h2F}); put64(p_seq, 16'h29, 64'h200);   // mrmovq 0x200,%rdx
    put(p_seq, 16'h31, '{8'h00});                                         // halt
    put(p_seq, 16'h32, '{8'h63, 8'h00});                                  // f: xorq %rax,%rax
    put(p_seq, 16'h34, '{8'h30, 8'hF6}); put64(p_seq, 16'h36, 64'd1);     // irmovq $1,%rsi
    put(p_seq, 16'h3e, '{8'h60, 8'h70});                                  // loop: addq %rdi,%rax
    put(p_seq, 16'h40, '{8'hA0, 8'h0F});                                  // pushq %rax
    put(p_seq, 16'h42, '{8'hB0, 8'h3F});                                  // popq %rbx
    put(p_seq, 16'h44, '{8'h61, 8'h67});                                  // subq %rsi,%rdi
    put(p_seq, 16'h46, '{8'h26, 8'h01});                                  // cmovg %rax,%rcx
    put(p_seq, 16'h48, '{8'h74});        put64(p_seq, 16'h49, 64'h3e);    // jne loop
    put(p_seq, 16'h51, '{8'h90});                                         // ret
    // ---- mov program
    put(p_mov, 16'h00, '{8'h30, 8'hF8}); put64(p_mov, 16'h02, 64'h1234);  // irmovq $0x1234,%r8
    put(p_mov, 16'h0a, '{8'h30, 8'hF9}); put64(p_mov, 16'h0c, 64'h200 - 64'h1234);
    put(p_mov, 16'h14, '{8'h40, 8'h89}); put64(p_mov, 16'h16, 64'h1234);  // rmmovq %r8,0x1234(%r9)
    put(p_mov, 16'h1e, '{8'h20, 8'h8A});                                  // rrmovq %r8,%r10
    put(p_mov, 16'h20, '{8'h50, 8'hB9}); put64(p_mov, 16'h22, 64'h1234);  // mrmovq 0x1234(%r9),%r11
    put(p_mov, 16'h2a, '{8'h00});
    // ---- add program
    put(p_add, 0, '{8'h60, 8'h12, 8'h60, 8'h21, 8'h60, 8'h22, 8'h20, 8'h00});
    // ---- nop/jmp example
    put(p_jmp, 16'h00, '{8'h10});
    put(p_jmp, 16'h01, '{8'h70}); put64(p_jmp, 16'h02, 64'h13);
    put(p_jmp, 16'h0a, '{8'h70}); put64(p_jmp, 16'h0b, 64'h1c);
    put(p_jmp, 16'h13, '{8'h70}); put64(p_jmp, 16'h14, 64'h0a);
    put(p_jmp, 16'h1c, '{8'h10, 8'h10, 8'h00});
    // ---- nops
    put(p_halt, 0, '{8'h10, 8'h10, 8'h10, 8'h10, 8'h10, 8'h00});
    for (int i = 0; i < N; i++) p_nop[i] = 8'h10;

    rst = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      seq_load     = '{en: 1'b1, addr: word_t'(i), data: p_seq[i]};
      mov_load     = '{en: 1'b1, addr: word_t'(i), data: p_mov[i]};
      add_load     = '{en: 1'b1, addr: word_t'(i), data: p_add[i]};
      nopjmp_load  = '{en: 1'b1, addr: word_t'(i), data: p_jmp[i]};
      nophalt_load = '{en: 1'b1, addr: word_t'(i), data: p_halt[i]};
      nop_load     = '{en: 1'b1, addr: word_t'(i), data: p_nop[i]};
    end
    @(negedge clk);
    seq_load.en = 0; mov_load.en = 0; add_load.en = 0;
    nopjmp_load.en = 0; nophalt_load.en = 0; nop_load.en = 0;
    @(posedge clk); #1;
    dut.u_add.u_rf.regs[1] = 64'd3;          // the add machine cannot load constants
    dut.u_add.u_rf.regs[2] = 64'd4;
    {m_jtaken, m_jnot, m_cmov_t, m_cmov_n, m_call, m_ret, m_push, m_pop, m_rd, m_wr} = '0;
    {cyc_seq, cyc_mov, cyc_add, cyc_jmp, cyc_halt} = '0;
    @(negedge clk);
    rst = 0;
    cycles = 0;
    while (seq_stat == STAT_AOK && cycles < 200) begin
      check(nop_pc == word_t'(cycles) && count == word_t'(cycles) && nop_stat == STAT_AOK,
            $sformatf("cycle %0d: nop pc %0d, count %0d", cycles, nop_pc, count));
      @(negedge clk);
      cycles++;
    end
    repeat (3) @(negedge clk);

    // seq
    check(cyc_seq == 39, $sformatf("seq cycles %0d, expected 39", cyc_seq));
    check(seq_stat == STAT_HLT && seq_pc == 64'h31, "seq halted at its halt");
    check(dut.u_seq.u_rf.regs[0] == 15, "seq %rax = 15");
    check(dut.u_seq.u_rf.regs[3] == 15, "seq %rbx = 15 (push/pop)");
    check(dut.u_seq.u_rf.regs[1] == 14, "seq %rcx = 14 (last cmovg not taken)");
    check(dut.u_seq.u_rf.regs[2] == 15, "seq %rdx = 15 (stored and reloaded)");
    check(dut.u_seq.u_rf.regs[4] == 64'h3F8, "seq %rsp restored by ret");
    check(dut.u_seq.u_rf.regs[7] == 0, "seq %rdi counted down to 0");
    // mov
    check(cyc_mov == 6, $sformatf("mov cycles %0d, expected 6", cyc_mov));
    check(mov_stat == STAT_HLT && mov_pc == 64'h2a, "mov halted");
    check(dut.u_mov.u_rf.regs[8] == 64'h1234 && dut.u_mov.u_rf.regs[10] == 64'h1234 &&
          dut.u_mov.u_rf.regs[11] == 64'h1234, "mov registers");
    check({dut.u_mov.u_dmem.mem[16'h201], dut.u_mov.u_dmem.mem[16'h200]} == 16'h1234, "mov memory");
    // add
    check(cyc_add == 4, $sformatf("add cycles %0d, expected 4", cyc_add));
    check(add_stat == STAT_INS && add_pc == 64'd6, "add stopped on the invalid instruction");
    check(dut.u_add.u_rf.regs[1] == 10 && dut.u_add.u_rf.regs[2] == 14, "add registers");
    // nopjmp, nophalt
    check(cyc_jmp == 7, $sformatf("nopjmp cycles %0d, expected 7", cyc_jmp));
    check(nopjmp_stat == STAT_HLT && nopjmp_pc == 64'h1e, "nopjmp halted");
    check(cyc_halt == 6, $sformatf("nophalt cycles %0d, expected 6", cyc_halt));
    check(nophalt_stat == STAT_HLT && nophalt_pc == 64'd5, "nophalt halted");
    check(nop_i10bytes == {10{8'h10}}, "nop fetches nops");

    // mechanisms
    m_hlt = (seq_stat == STAT_HLT) + (mov_stat == STAT_HLT) + (nopjmp_stat == STAT_HLT) +
            (nophalt_stat == STAT_HLT);
    m_ins = (add_stat == STAT_INS);
    $display("mechanisms: jump taken %0d, not taken %0d, cmov taken %0d, not taken %0d, call %0d, ret %0d, push %0d, pop %0d, mem read %0d, mem write %0d, halt stops %0d, invalid stops %0d",
             m_jtaken, m_jnot, m_cmov_t, m_cmov_n, m_call, m_ret, m_push, m_pop, m_rd, m_wr, m_hlt, m_ins);
    check(m_jtaken == 4 && m_jnot == 1, "jne taken 4 times, not taken once");
    check(m_cmov_t == 4 && m_cmov_n == 1, "cmovg taken 4 times, not taken once");
    check(m_call == 1 && m_ret == 1, "one call and one ret");
    check(m_push == 5 && m_pop == 5, "five pushes and pops");
    check(m_rd > 0 && m_wr > 0, "data memory read and written");
    check(m_hlt == 4, "four machines stopped by halt");
    check(m_ins == 1, "one machine stopped by an invalid instruction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
