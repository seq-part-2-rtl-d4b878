// tb_reg_file: self-checking test of reg_file.
// Random traffic on both write ports and both read ports against a model
// kept here: reads are combinational, writes appear after the rising edge,
// register 15 reads 0 and ignores writes, M wins over E on the same register.
module tb_reg_file;
  import y86_pkg::*;
  logic clk = 0, rst = 1;
  regnum_t reg_srcA = 0, reg_srcB = 0, reg_dstE = REG_NONE, reg_dstM = REG_NONE;
  word_t reg_inputE = 0, reg_inputM = 0, reg_outputA, reg_outputB;
  word_t model [16];
  int checks = 0, failures = 0;
  int same_port = 0;

  reg_file dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 16; i++) begin
      reg_srcA = regnum_t'(i); reg_srcB = regnum_t'(15 - i);
      #1 check(reg_outputA == 0 && reg_outputB == 0, "registers reset to 0");
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      reg_dstE   = regnum_t'($urandom);
      reg_dstM   = regnum_t'($urandom);
      if (i % 25 == 0) reg_dstM = reg_dstE;
      reg_inputE = {$urandom, $urandom};
      reg_inputM = {$urandom, $urandom};
      reg_srcA   = regnum_t'($urandom);
      reg_srcB   = regnum_t'($urandom);
      #1;
      check(reg_outputA == model[reg_srcA], $sformatf("read A r%0d", reg_srcA));
      check(reg_outputB == model[reg_srcB], $sformatf("read B r%0d", reg_srcB));
      @(posedge clk);
      if (reg_dstE != REG_NONE) model[reg_dstE] = reg_inputE;
      if (reg_dstM != REG_NONE) model[reg_dstM] = reg_inputM;
      if (reg_dstE == reg_dstM && reg_dstE != REG_NONE) same_port++;
      model[15] = '0;
    end
    check(same_port > 0, "both ports wrote one register at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
