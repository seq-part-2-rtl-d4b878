// tb_nopjmp_cpu: runs the nop/jmp/halt example program on nopjmp_cpu.
//
//   0x000: 10                    nop
//   0x001: 70 13 00 .. 00        jmp C
//   0x00a: 70 1c 00 .. 00     B: jmp D
//   0x013: 70 0a 00 .. 00     C: jmp B
//   0x01c: 10                 D: nop
//   0x01d: 10                    nop
//   0x01e: 00                    halt
//
// Checks the fetched word and the wires of the first cycle (i10bytes
// 0x137010, dest 0x1370, valP 1), the PC of every cycle, that the machine halts after exactly 7
// cycles with STAT_HLT, that it then stays halted, and that an unknown
// icode stops it with STAT_INS.
module tb_nopjmp_cpu;
  import y86_pkg::*;
  localparam int unsigned N = 64;
  logic clk = 0, rst = 1;
  mem_load_t load = '0;
  word_t pc;
  stat_e stat;
  int checks = 0, failures = 0;

  nopjmp_cpu #(.MEM_BYTES(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic load_prog(input logic [7:0] prog [$]);
    rst = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      load = '{en: 1'b1, addr: word_t'(i), data: (i < prog.size()) ? prog[i] : 8'h00};
    end
    @(negedge clk);
    load.en = 1'b0;
    @(negedge clk);
    rst = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] prog [$];
    word_t exp_pc [7] = '{64'h00, 64'h01, 64'h13, 64'h0a, 64'h1c, 64'h1d, 64'h1e};
    int cycles;
    prog = '{8'h10,
             8'h70, 8'h13, 0, 0, 0, 0, 0, 0, 0,
             8'h70, 8'h1c, 0, 0, 0, 0, 0, 0, 0,
             8'h70, 8'h0a, 0, 0, 0, 0, 0, 0, 0,
             8'h10, 8'h10, 8'h00};
    load_prog(prog);
    // wire values in the first cycle, at pc = 0
    check(dut.i10bytes == 80'h137010, $sformatf("i10bytes=%h", dut.i10bytes));
    check(dut.ins.icode == 4'h1 && dut.ins.dest == 64'h1370, "icode and dest of the first word");
    check(dut.valP == 64'h1 && dut.Stat == STAT_AOK, "valP and Stat of the first cycle");
    cycles = 0;
    while (stat == STAT_AOK && cycles < 20) begin
      if (cycles < 7) check(pc == exp_pc[cycles], $sformatf("cycle %0d pc=%h exp=%h", cycles, pc, exp_pc[cycles]));
      @(negedge clk);
      cycles++;
    end
    check(cycles == 7, $sformatf("cycles run %0d, expected 7", cycles));
    check(stat == STAT_HLT, "halted with STAT_HLT");
    repeat (5) @(negedge clk);
    check(pc == 64'h1e && stat == STAT_HLT, "stays halted at the halt");

    prog = '{8'h10, 8'hC0};            // nop, then an invalid icode
    load_prog(prog);
    repeat (4) @(negedge clk);
    check(stat == STAT_INS && pc == 64'h1, "invalid instruction stops with STAT_INS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
