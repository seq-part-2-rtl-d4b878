// tb_counter: self-checking test of counter.
// After reset the count must equal the number of rising edges seen.
module tb_counter;
  logic clk = 0, rst = 1;
  logic [7:0] count;
  int checks = 0, failures = 0;

  counter #(.WIDTH(8)) dut (.clk, .rst, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    checks++; if (count != 0) failures++;
    rst = 0;
    for (int n = 1; n <= 300; n++) begin   // wraps past 255
      @(negedge clk);
      checks++;
      if (count != 8'(n)) begin
        failures++; $display("FAIL: after %0d edges count=%0d", n, count);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
