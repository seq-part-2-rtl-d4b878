// tb_add_cpu: runs a chain of register additions on add_cpu.
//
// All registers reset to zero and this machine has no way to load a
// constant, so the test first places start values into the register array
// directly, then runs addq instructions (60 rA:rB) and checks every register
// against a model after each cycle; a final halt must stop it after exactly
// one cycle per instruction with STAT_HLT.  A source of register 15 reads 0.
module tb_add_cpu;
  import y86_pkg::*;
  localparam int unsigned N = 64;
  localparam int unsigned NINS = 12;
  logic clk = 0, rst = 1;
  mem_load_t load = '0;
  word_t pc;
  stat_e stat;
  word_t model [16];
  logic [7:0] prog [$];
  int checks = 0, failures = 0;

  add_cpu #(.MEM_BYTES(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    for (int i = 0; i < NINS; i++) begin
      logic [3:0] ra, rb;
      ra = 4'($urandom % 15);
      rb = 4'($urandom % 15);
      if (i == 3) ra = 4'hF;
      prog.push_back(8'h60);
      prog.push_back({ra, rb});
    end
    prog.push_back(8'h00);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      load = '{en: 1'b1, addr: word_t'(i), data: (i < prog.size()) ? prog[i] : 8'h00};
    end
    @(negedge clk);
    load.en = 1'b0;
    @(posedge clk);                  // reset has cleared the array; seed it
    #1;
    for (int r = 0; r < 15; r++) begin
      model[r] = {$urandom, $urandom};
      dut.u_rf.regs[r] = model[r];
    end
    model[15] = '0;
    @(negedge clk);
    rst = 0;
    cycles = 0;
    while (stat == STAT_AOK && cycles < 40) begin
      logic [3:0] ra, rb;
      check(pc == word_t'(2 * cycles), $sformatf("cycle %0d pc=%0h", cycles, pc));
      if (cycles < NINS) begin
        ra = prog[2*cycles+1][7:4];
        rb = prog[2*cycles+1][3:0];
        model[rb] = model[ra] + model[rb];
      end
      @(negedge clk);
      cycles++;
      for (int r = 0; r < 15; r++)
        check(dut.u_rf.regs[r] == model[r], $sformatf("cycle %0d r%0d=%h exp %h", cycles, r, dut.u_rf.regs[r], model[r]));
    end
    check(cycles == NINS + 1, $sformatf("cycles run %0d, expected %0d", cycles, NINS + 1));
    check(stat == STAT_HLT, "halted with STAT_HLT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
