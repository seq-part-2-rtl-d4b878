// tb_stat_reg: self-checking test of stat_reg.
// The register follows AOK inputs, latches the first non-AOK status, then
// holds it (and running stays low) whatever comes in, until reset.
module tb_stat_reg;
  import y86_pkg::*;
  logic clk = 0, rst = 1, running;
  stat_e stat_in = STAT_AOK, stat_q;
  int checks = 0, failures = 0;

  stat_reg dut (.clk, .rst, .stat_in, .stat_q, .running);

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
    stat_e stops [3] = '{STAT_HLT, STAT_INS, STAT_ADR};
    foreach (stops[s]) begin
      rst = 1; stat_in = STAT_AOK;
      @(negedge clk); @(negedge clk);
      rst = 0;
      check(stat_q == STAT_AOK && running, "AOK after reset");
      repeat (5) begin
        @(negedge clk);
        check(stat_q == STAT_AOK && running, "stays AOK on AOK input");
      end
      stat_in = stops[s];
      #1 check(running, "status changes only at the edge");
      @(negedge clk);
      check(stat_q == stops[s] && !running, "latches stop status");
      stat_in = STAT_AOK;
      repeat (3) begin
        @(negedge clk);
        check(stat_q == stops[s] && !running, "holds stop status");
      end
      stat_in = stops[(s + 1) % 3];
      @(negedge clk);
      check(stat_q == stops[s], "first stop status is kept");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
