// tb_nophalt_cpu: runs nop/halt programs on nophalt_cpu.
// Five nops then halt must stop after 6 cycles with STAT_HLT and the PC at
// the halt; a jmp (not known to this machine) must stop it with STAT_INS.
module tb_nophalt_cpu;
  import y86_pkg::*;
  localparam int unsigned N = 32;
  logic clk = 0, rst = 1;
  mem_load_t load = '0;
  word_t pc;
  stat_e stat;
  int checks = 0, failures = 0;

  nophalt_cpu #(.MEM_BYTES(N)) dut (.*);

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
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    load_prog('{8'h10, 8'h10, 8'h10, 8'h10, 8'h10, 8'h00});
    cycles = 0;
    while (stat == STAT_AOK && cycles < 20) begin
      check(pc == word_t'(cycles), $sformatf("cycle %0d pc=%0h", cycles, pc));
      @(negedge clk);
      cycles++;
    end
    check(cycles == 6, $sformatf("cycles run %0d, expected 6", cycles));
    check(stat == STAT_HLT && pc == 64'd5, "halted at the halt");
    repeat (3) @(negedge clk);
    check(stat == STAT_HLT && pc == 64'd5, "stays halted");

    load_prog('{8'h10, 8'h10, 8'h70, 8'h00});
    repeat (5) @(negedge clk);
    check(stat == STAT_INS && pc == 64'd2, "jmp is invalid here");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
