// tb_instr_mem: self-checking test of instr_mem.
// Fills the memory with random bytes through the load port, then reads at
// random and edge addresses and compares the 80-bit little-endian word with
// the bytes it should hold (zero past the end of memory).
module tb_instr_mem;
  import y86_pkg::*;
  localparam int unsigned N = 256;
  logic clk = 0;
  mem_load_t load = '0;
  word_t pc = 0;
  iword_t i10bytes, exp;
  logic [7:0] model [N];
  int checks = 0, failures = 0;

  instr_mem #(.MEM_BYTES(N)) dut (.clk, .load, .pc, .i10bytes);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      model[i] = 8'($urandom);
      load = '{en: 1'b1, addr: word_t'(i), data: model[i]};
    end
    @(negedge clk);
    load = '{en: 1'b1, addr: 64'h1_0000, data: 8'h55};   // out of range: ignored
    @(negedge clk);
    load.en = 1'b0;
    for (int i = 0; i < 600; i++) begin
      word_t a;
      if (i < 20)       pc = word_t'(N - 12 + i);
      else if (i == 20) pc = 64'h1_0000;
      else              pc = word_t'($urandom % N);
      #1;
      for (int k = 0; k < 10; k++) begin
        a = pc + word_t'(k);
        exp[8*k +: 8] = (a < N) ? model[a] : 8'h00;
      end
      checks++;
      if (i10bytes != exp) begin
        failures++; $display("FAIL: pc=%0h got %h exp %h", pc, i10bytes, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
