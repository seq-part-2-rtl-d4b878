// tb_reg_bank: self-checking test of reg_bank.
// Checks the initial value after reset, that q takes d at each rising edge
// (d seen only one cycle later), and that en low holds the value.
module tb_reg_bank;
  localparam int unsigned W = 16;
  localparam logic [W-1:0] INIT = 16'hA5C3;
  logic clk = 0, rst = 1, en = 1;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  reg_bank #(.WIDTH(W), .INIT(INIT)) dut (.clk, .rst, .en, .d, .q);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    check(q == INIT, "initial value after reset");
    rst = 0;
    model = INIT;
    for (int i = 0; i < 200; i++) begin
      d  = W'($urandom);
      en = ($urandom % 4) != 0;
      #1 check(q == model, "q changed before the clock edge");
      @(posedge clk); #1;
      if (en) model = d;
      check(q == model, $sformatf("cycle %0d q=%h exp=%h", i, q, model));
      @(negedge clk);
    end
    rst = 1; @(negedge clk);
    check(q == INIT, "reset reloads initial value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
