// tb_seq_cpu: runs Y86-64 programs on seq_cpu against an instruction-level
// reference interpreter kept in this testbench.
//
// Program 1 sums an array in a subroutine: call, ret, a loop closed by jne,
// mrmovq, addq, subq, andq, xorq, pushq/popq around the call, cmovXX of both
// outcomes, rmmovq of the result, popq %rsp.  Program 2 is random straight-line
// code (irmovq, rrmovq/cmovXX, OPq, pushq, popq, rmmovq, mrmovq) with forward
// jXX of random condition.  After every cycle the PC, all registers and the
// two flags are compared with the interpreter; at the end the data memory is
// compared and the cycle count must be one per instruction, halt included.
// Directed cases then check STAT_INS for a bad function code and STAT_ADR
// for an access past the end of memory.
module tb_seq_cpu;
  import y86_pkg::*;
  localparam int unsigned N = 1024;
  logic clk = 0, rst = 1;
  mem_load_t load = '0;
  word_t pc;
  stat_e stat;
  int checks = 0, failures = 0;
  int seen [16];             // instructions executed, per icode
  int taken = 0, not_taken = 0;

  // reference state
  logic [7:0] imem [N];
  logic [7:0] dmem [N];
  word_t      R [16];
  word_t      mpc;
  logic       zf, sf;
  int         asm_pc;

  seq_cpu #(.MEM_BYTES(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------------------- model
  function automatic word_t rdi(input word_t a);
    word_t v;
    for (int k = 0; k < 8; k++) v[8*k +: 8] = imem[a + k];
    return v;
  endfunction

  function automatic word_t rdd(input word_t a);
    word_t v;
    for (int k = 0; k < 8; k++) v[8*k +: 8] = dmem[a + k];
    return v;
  endfunction

  function automatic void wrd(input word_t a, input word_t v);
    for (int k = 0; k < 8; k++) dmem[a + k] = v[8*k +: 8];
  endfunction

  function automatic bit cond(input logic [3:0] f);
    case (f)
      0: return 1;
      1: return sf || zf;
      2: return sf;
      3: return zf;
      4: return !zf;
      5: return !sf;
      6: return !sf && !zf;
      default: return 0;
    endcase
  endfunction

  // executes one instruction; returns 0 (and changes nothing) on halt
  function automatic bit step();
    logic [3:0] ic, fn, ra, rb;
    word_t c, v, t;
    ic = imem[mpc][7:4];  fn = imem[mpc][3:0];
    ra = imem[mpc + 1][7:4];  rb = imem[mpc + 1][3:0];
    c  = rdi(mpc + 2);
    if (ic == 0) return 0;
    seen[ic]++;
    case (ic)
      4'h1: mpc += 1;
      4'h2: begin if (cond(fn)) R[rb] = R[ra]; mpc += 2; end
      4'h3: begin R[rb] = c; mpc += 10; end
      4'h4: begin wrd(c + R[rb], R[ra]); mpc += 10; end
      4'h5: begin R[ra] = rdd(c + R[rb]); mpc += 10; end
      4'h6: begin
        case (fn)
          0: v = R[rb] + R[ra];
          1: v = R[rb] - R[ra];
          2: v = R[rb] & R[ra];
          default: v = R[rb] ^ R[ra];
        endcase
        R[rb] = v; zf = (v == 0); sf = v[63]; mpc += 2;
      end
      4'h7: begin
        if (cond(fn)) begin mpc = rdi(mpc + 1); taken++; end
        else          begin mpc += 9; not_taken++; end
      end
      4'h8: begin R[4] -= 8; wrd(R[4], mpc + 9); mpc = rdi(mpc + 1); end
      4'h9: begin t = rdd(R[4]); R[4] += 8; mpc = t; end
      4'hA: begin v = R[ra]; R[4] -= 8; wrd(R[4], v); mpc += 2; end
      4'hB: begin v = rdd(R[4]); R[4] += 8; R[ra] = v; mpc += 2; end
      default: ;
    endcase
    R[15] = '0;
    return 1;
  endfunction

  // ---------------------------------------------------------------- assembler
  task automatic emit(input logic [7:0] b);
    imem[asm_pc] = b; asm_pc++;
  endtask
  task automatic emit64(input word_t v);
    for (int k = 0; k < 8; k++) emit(v[8*k +: 8]);
  endtask
  task automatic patch64(input int at, input word_t v);
    for (int k = 0; k < 8; k++) imem[at + k] = v[8*k +: 8];
  endtask
  task automatic op2(input logic [7:0] b0, input logic [3:0] ra, input logic [3:0] rb);
    emit(b0); emit({ra, rb});
  endtask
  task automatic op10(input logic [7:0] b0, input logic [3:0] ra, input logic [3:0] rb, input word_t v);
    emit(b0); emit({ra, rb}); emit64(v);
  endtask
  task automatic op9(input logic [7:0] b0, input word_t d);
    emit(b0); emit64(d);
  endtask

  // ---------------------------------------------------------------- run
  task automatic run(input int max_cycles);
    int cycles, n;
    rst = 1;
    for (int i = 0; i < N; i++) begin
      dmem[i] = imem[i];
      @(negedge clk);
      load = '{en: 1'b1, addr: word_t'(i), data: imem[i]};
    end
    @(negedge clk);
    load.en = 1'b0;
    foreach (R[r]) R[r] = '0;
    mpc = 0; zf = 1; sf = 0;
    @(negedge clk);
    rst = 0;
    cycles = 0; n = 0;
    while (stat == STAT_AOK && cycles < max_cycles) begin
      check(pc == mpc, $sformatf("cycle %0d pc=%0h exp %0h", cycles, pc, mpc));
      if (step()) n++;
      @(negedge clk);
      cycles++;
      for (int r = 0; r < 15; r++)
        check(dut.u_rf.regs[r] == R[r],
              $sformatf("cycle %0d r%0d=%h exp %h", cycles, r, dut.u_rf.regs[r], R[r]));
      check(dut.cC.q == {zf, sf}, $sformatf("cycle %0d flags", cycles));
    end
    check(cycles == n + 1, $sformatf("cycles run %0d, expected %0d", cycles, n + 1));
    check(stat == STAT_HLT && pc == mpc, "halted with STAT_HLT at the halt");
    for (int i = 0; i < N; i++)
      check(dut.u_dmem.mem[i] == dmem[i], $sformatf("data byte %0h", i));
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int call_at, sum_addr, jmp_at, loop_addr, test_addr;
    foreach (seen[i]) seen[i] = 0;

    // ---------------- program 1: array sum through a subroutine
    foreach (imem[i]) imem[i] = 8'h00;
    for (int i = 0; i < 6; i++) patch64(16'h300 + 8 * i, word_t'(1000 * (i + 1) + i));
    asm_pc = 0;
    op10(8'h30, 4'hF, 4'h4, 64'h3F8);        // irmovq $0x3f8, %rsp
    op10(8'h30, 4'hF, 4'h7, 64'h300);        // irmovq $0x300, %rdi
    op10(8'h30, 4'hF, 4'h6, 64'd6);          // irmovq $6, %rsi
    op10(8'h30, 4'hF, 4'hB, 64'h77);         // irmovq $0x77, %r11
    op2 (8'hA0, 4'hB, 4'hF);                 // pushq %r11
    call_at = asm_pc;
    op9 (8'h80, 64'h0);                      // call sum
    op2 (8'hB0, 4'hC, 4'hF);                 // popq %r12
    op10(8'h40, 4'h0, 4'h7, 64'h40);         // rmmovq %rax, 0x40(%rdi)
    op2 (8'h62, 4'h6, 4'h6);                 // andq %rsi, %rsi   (ZF=1)
    op2 (8'h23, 4'h0, 4'h1);                 // cmove %rax, %rcx  (moves)
    op2 (8'h24, 4'h0, 4'h2);                 // cmovne %rax, %rdx (does not)
    op2 (8'h61, 4'h0, 4'h3);                 // subq %rax, %rbx   (negative)
    op2 (8'h22, 4'h0, 4'h5);                 // cmovl %rax, %rbp  (moves)
    op2 (8'h26, 4'h0, 4'h8);                 // cmovg %rax, %r8   (does not)
    op2 (8'hA0, 4'h3, 4'hF);                 // pushq %rbx
    op2 (8'hB0, 4'h4, 4'hF);                 // popq %rsp
    op2 (8'h10, 4'h0, 4'h0);                 // nop, halt
    asm_pc--; emit(8'h10); emit(8'h00);
    sum_addr = asm_pc;
    patch64(call_at + 1, word_t'(sum_addr));
    op10(8'h30, 4'hF, 4'h8, 64'd8);          // irmovq $8, %r8
    op10(8'h30, 4'hF, 4'h9, 64'd1);          // irmovq $1, %r9
    op2 (8'h63, 4'h0, 4'h0);                 // xorq %rax, %rax
    op2 (8'h62, 4'h6, 4'h6);                 // andq %rsi, %rsi
    jmp_at = asm_pc;
    op9 (8'h70, 64'h0);                      // jmp test
    loop_addr = asm_pc;
    op10(8'h50, 4'hA, 4'h7, 64'h0);          // mrmovq (%rdi), %r10
    op2 (8'h60, 4'hA, 4'h0);                 // addq %r10, %rax
    op2 (8'h60, 4'h8, 4'h7);                 // addq %r8, %rdi
    op2 (8'h61, 4'h9, 4'h6);                 // subq %r9, %rsi
    test_addr = asm_pc;
    patch64(jmp_at + 1, word_t'(test_addr));
    op9 (8'h74, word_t'(loop_addr));         // jne loop
    emit(8'h90);                             // ret
    run(200);
    check(R[0] == 64'd21015 && dut.u_rf.regs[0] == 64'd21015, "array sum");
    check(dut.u_rf.regs[12] == 64'h77, "value pushed before the call popped after it");

    // ---------------- program 2: random straight-line code, forward jumps
    foreach (imem[i]) imem[i] = 8'h00;
    asm_pc = 0;
    op10(8'h30, 4'hF, 4'h4, 64'h3C0);        // irmovq $0x3c0, %rsp
    op10(8'h30, 4'hF, 4'hE, 64'h280);        // irmovq $0x280, %r14 (data base)
    for (int i = 0; i < 60; i++) begin
      logic [3:0] ra, rb, sel;
      do ra = 4'($urandom % 15); while (ra == 4 || ra == 14);
      do rb = 4'($urandom % 15); while (rb == 4 || rb == 14);
      sel = 4'($urandom % 9);
      case (sel)
        0: op10(8'h30, 4'hF, rb, {$urandom, $urandom});
        1: op2 ({4'h2, 4'($urandom % 7)}, ra, rb);
        2, 3: op2 ({4'h6, 4'($urandom % 4)}, ra, rb);
        4: op2 (8'hA0, ra, 4'hF);
        5: op2 (8'hB0, ra, 4'hF);
        6: op10(8'h40, ra, 4'hE, word_t'($urandom % 120));
        7: op10(8'h50, ra, 4'hE, word_t'($urandom % 120));
        default: begin                       // jXX over the next instruction
          jmp_at = asm_pc;
          op9({4'h7, 4'($urandom % 7)}, 64'h0);
          op10(8'h30, 4'hF, rb, {$urandom, $urandom});
          patch64(jmp_at + 1, word_t'(asm_pc));
        end
      endcase
    end
    emit(8'h00);
    for (int i = 16'h280; i < 16'h300; i++) imem[i] = 8'($urandom);
    run(400);

    // ---------------- directed status cases
    foreach (imem[i]) imem[i] = 8'h00;
    imem[0] = 8'h10; imem[1] = 8'h64; imem[2] = 8'h01;       // nop; OPq fn 4
    run_status(STAT_INS, 64'd1, "bad OPq function code gives STAT_INS");
    foreach (imem[i]) imem[i] = 8'h00;
    asm_pc = 0;
    op10(8'h30, 4'hF, 4'h1, 64'd1020);                        // irmovq $1020, %rcx
    op10(8'h50, 4'h2, 4'h1, 64'h0);                           // mrmovq (%rcx), %rdx
    run_status(STAT_ADR, 64'd10, "read past the end gives STAT_ADR");
    check(dut.u_rf.regs[2] == 0, "faulting load writes nothing");

    check(seen[1] > 0 && seen[2] > 0 && seen[3] > 0 && seen[4] > 0 && seen[5] > 0 &&
          seen[6] > 0 && seen[7] > 0 && seen[8] > 0 && seen[9] > 0 && seen[10] > 0 &&
          seen[11] > 0, "every instruction executed");
    check(taken > 0 && not_taken > 0, "branches both taken and not taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_status(input stat_e exp, input word_t exp_pc, input string msg);
    rst = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      load = '{en: 1'b1, addr: word_t'(i), data: imem[i]};
    end
    @(negedge clk); load.en = 1'b0; @(negedge clk); rst = 0;
    repeat (6) @(negedge clk);
    check(stat == exp && pc == exp_pc, msg);
  endtask
endmodule
