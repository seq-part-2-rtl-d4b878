// tb_nop_cpu: runs a program on nop_cpu.
// The PC must start at 0 and rise by one per cycle, the fetched word must be
// the ten bytes at the PC, and the status must stay STAT_AOK (the machine
// never stops by itself).
module tb_nop_cpu;
  import y86_pkg::*;
  localparam int unsigned N = 64;
  logic clk = 0, rst = 1;
  mem_load_t load = '0;
  word_t pc;
  iword_t i10bytes, exp;
  stat_e stat;
  logic [7:0] image [N];
  int checks = 0, failures = 0;

  nop_cpu #(.MEM_BYTES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      image[i] = (i < 5) ? 8'h10 : 8'($urandom);   // nops.yo, then filler
      @(negedge clk);
      load = '{en: 1'b1, addr: word_t'(i), data: image[i]};
    end
    @(negedge clk);
    load.en = 1'b0;
    @(negedge clk);
    rst = 0;
    for (int c = 0; c < 60; c++) begin
      for (int k = 0; k < 10; k++)
        exp[8*k +: 8] = (c + k < N) ? image[c + k] : 8'h00;
      checks++;
      if (pc != word_t'(c) || i10bytes != exp || stat != STAT_AOK) begin
        failures++;
        $display("FAIL: cycle %0d pc=%0h i10bytes=%h exp=%h stat=%0d", c, pc, i10bytes, exp, stat);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
