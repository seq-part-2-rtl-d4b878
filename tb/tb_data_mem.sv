// tb_data_mem: self-checking test of data_mem.
// Random 64-bit reads and writes at unaligned byte addresses against a byte
// model: a read gives the value in the same cycle, a write is visible only
// after the rising edge, the output is 0 without mem_readbit, and bytes past
// the end read 0.
module tb_data_mem;
  import y86_pkg::*;
  localparam int unsigned N = 128;
  logic clk = 0;
  mem_load_t load = '0;
  word_t mem_addr = 0, mem_input = 0, mem_output, exp;
  logic mem_readbit = 0, mem_writebit = 0;
  logic [7:0] model [N];
  int checks = 0, failures = 0;

  data_mem #(.MEM_BYTES(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic word_t model_read(input word_t addr);
    word_t v, a;
    for (int k = 0; k < 8; k++) begin
      a = addr + word_t'(k);
      v[8*k +: 8] = (a < N) ? model[a] : 8'h00;
    end
    return v;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
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
    load.en = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      mem_addr     = word_t'($urandom % (N + 4));
      mem_input    = {$urandom, $urandom};
      mem_writebit = ($urandom % 2) == 1;
      mem_readbit  = !mem_writebit && (($urandom % 8) != 0);
      #1;
      exp = mem_readbit ? model_read(mem_addr) : '0;
      check(mem_output == exp, $sformatf("read @%0h got %h exp %h", mem_addr, mem_output, exp));
      @(posedge clk);
      if (mem_writebit)
        for (int k = 0; k < 8; k++)
          if (mem_addr + k < N) model[mem_addr + k] = mem_input[8*k +: 8];
    end
    // a written word reads back on the next cycle
    @(negedge clk);
    mem_addr = 64'd5; mem_input = 64'h0123_4567_89AB_CDEF; mem_writebit = 1; mem_readbit = 0;
    @(negedge clk);
    mem_writebit = 0; mem_readbit = 1;
    #1 check(mem_output == 64'h0123_4567_89AB_CDEF, "write then read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
