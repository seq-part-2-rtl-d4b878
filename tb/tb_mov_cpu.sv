// tb_mov_cpu: runs move programs on mov_cpu against an instruction-level
// model kept in this testbench.
//
// Program 1 uses the example encodings 30 F8 34 12 .. (irmovq $0x1234,%r8),
// 40 89 34 12 .. (rmmovq %r8,0x1234(%r9)) and 20 89-style register moves, with
// %r9 chosen so that 0x1234(%r9) lands inside the memory.  Program 2 is a
// random sequence of the four moves, with %r14 as a fixed base register for
// the memory accesses.  After every cycle all registers and the PC are
// compared with the model; at the end the data memory is compared, and the
// cycle count must be one per instruction, the halt included.
module tb_mov_cpu;
  import y86_pkg::*;
  localparam int unsigned N = 1024;
  localparam word_t DATA_BASE = 64'h300;
  logic clk = 0, rst = 1;
  mem_load_t load = '0;
  word_t pc;
  stat_e stat;
  int checks = 0, failures = 0;
  int n_rr = 0, n_ir = 0, n_rm = 0, n_mr = 0;

  logic [7:0] mimg [N];     // model memory
  word_t      mreg [16];    // model registers
  word_t      mpc;

  mov_cpu #(.MEM_BYTES(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic word_t rd64(input word_t a);
    word_t v;
    for (int k = 0; k < 8; k++) v[8*k +: 8] = (a + k < N) ? mimg[a + k] : 8'h00;
    return v;
  endfunction

  // one instruction of the model; returns 0 on halt
  function automatic bit step();
    logic [3:0] ic, ra, rb;
    word_t c, ea;
    ic = mimg[mpc][7:4];
    ra = mimg[mpc + 1][7:4];
    rb = mimg[mpc + 1][3:0];
    c  = rd64(mpc + 2);
    case (ic)
      4'h2: begin mreg[rb] = mreg[ra]; mpc += 2; n_rr++; end
      4'h3: begin mreg[rb] = c; mpc += 10; n_ir++; end
      4'h4: begin
        ea = c + mreg[rb];
        for (int k = 0; k < 8; k++) if (ea + k < N) mimg[ea + k] = mreg[ra][8*k +: 8];
        mpc += 10; n_rm++;
      end
      4'h5: begin mreg[ra] = rd64(c + mreg[rb]); mpc += 10; n_mr++; end
      default: return 0;
    endcase
    mreg[15] = '0;
    return 1;
  endfunction

  task automatic put10(inout int a, input logic [7:0] b0, input logic [7:0] b1, input word_t v);
    mimg[a] = b0; mimg[a + 1] = b1;
    for (int k = 0; k < 8; k++) mimg[a + 2 + k] = v[8*k +: 8];
    a += 10;
  endtask

  task automatic put2(inout int a, input logic [7:0] b0, input logic [7:0] b1);
    mimg[a] = b0; mimg[a + 1] = b1;
    a += 2;
  endtask

  task automatic run_image(input int n_instr);
    int cycles;
    rst = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      load = '{en: 1'b1, addr: word_t'(i), data: mimg[i]};
    end
    @(negedge clk);
    load.en = 1'b0;
    foreach (mreg[r]) mreg[r] = '0;
    mpc = 0;
    @(negedge clk);
    rst = 0;
    cycles = 0;
    while (stat == STAT_AOK && cycles < 200) begin
      check(pc == mpc, $sformatf("cycle %0d pc=%0h exp %0h", cycles, pc, mpc));
      void'(step());
      @(negedge clk);
      cycles++;
      for (int r = 0; r < 15; r++)
        check(dut.u_rf.regs[r] == mreg[r],
              $sformatf("cycle %0d r%0d=%h exp %h", cycles, r, dut.u_rf.regs[r], mreg[r]));
    end
    check(cycles == n_instr + 1, $sformatf("cycles run %0d, expected %0d", cycles, n_instr + 1));
    check(stat == STAT_HLT && pc == mpc, "halted with STAT_HLT at the halt");
    for (int i = 0; i < N; i++)
      check(dut.u_dmem.mem[i] == mimg[i], $sformatf("data byte %0h", i));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    // ---- program 1
    foreach (mimg[i]) mimg[i] = 8'h00;
    for (int i = 0; i < 8; i++) mimg[16'h208 + i] = 8'($urandom);
    a = 0;
    put10(a, 8'h30, 8'hF8, 64'h1234);                       // irmovq $0x1234, %r8
    put10(a, 8'h30, 8'hF9, 64'h200 - 64'h1234);             // irmovq $(0x200-0x1234), %r9
    put10(a, 8'h40, 8'h89, 64'h1234);                       // rmmovq %r8, 0x1234(%r9)
    put2 (a, 8'h20, 8'h8A);                                 // rrmovq %r8, %r10
    put10(a, 8'h50, 8'hB9, 64'h1234);                       // mrmovq 0x1234(%r9), %r11
    put10(a, 8'h50, 8'hC9, 64'h123C);                       // mrmovq 0x123C(%r9), %r12
    put2 (a, 8'h20, 8'hC0);                                 // rrmovq %r12, %rax
    mimg[a] = 8'h00;                                        // halt
    run_image(7);
    check(dut.u_rf.regs[11] == 64'h1234, "stored word read back");
    check(dut.u_rf.regs[0] == rd64(64'h208), "preloaded word read");

    // ---- program 2: random moves
    foreach (mimg[i]) mimg[i] = (i >= DATA_BASE) ? 8'($urandom) : 8'h00;
    a = 0;
    put10(a, 8'h30, 8'hFE, DATA_BASE);                      // irmovq $0x300, %r14
    for (int i = 0; i < 40; i++) begin
      logic [3:0] ra, rb;
      ra = 4'($urandom % 14);
      rb = 4'($urandom % 14);
      case ($urandom % 4)
        0: put2 (a, 8'h20, {ra, rb});
        1: put10(a, 8'h30, {4'hF, rb}, {$urandom, $urandom});
        2: put10(a, 8'h40, {ra, 4'hE}, word_t'($urandom % 248));
        default: put10(a, 8'h50, {ra, 4'hE}, word_t'($urandom % 248));
      endcase
    end
    mimg[a] = 8'h00;
    run_image(41);
    check(n_rr > 0 && n_ir > 0 && n_rm > 0 && n_mr > 0, "all four moves exercised");

    // ---- an unknown instruction stops the machine
    foreach (mimg[i]) mimg[i] = 8'h00;
    mimg[0] = 8'h20; mimg[1] = 8'h01; mimg[2] = 8'h60; mimg[3] = 8'h01;
    rst = 1;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      load = '{en: 1'b1, addr: word_t'(i), data: mimg[i]};
    end
    @(negedge clk); load.en = 1'b0; @(negedge clk); rst = 0;
    repeat (4) @(negedge clk);
    check(stat == STAT_INS && pc == 64'd2, "OPq is invalid on this machine");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
