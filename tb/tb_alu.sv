// tb_alu: self-checking test of alu.
// Random and corner operands for add, sub (b - a), and, xor; checks result,
// zero flag and sign flag against a reference computed here.
module tb_alu;
  import y86_pkg::*;
  alu_fn_e fn;
  word_t a, b, result, exp;
  logic zf, sf;
  int checks = 0, failures = 0;

  alu dut (.fn, .a, .b, .result, .zf, .sf);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a  = {$urandom, $urandom};
      b  = {$urandom, $urandom};
      if (i % 10 == 0) a = b;          // zero results for sub / xor
      if (i % 17 == 0) b = '1;
      fn = alu_fn_e'(i % 4);
      #1;
      case (i % 4)
        0: exp = a + b;
        1: exp = b + (~a + 64'd1);
        2: exp = ~(~a | ~b);
        default: exp = (a | b) & ~(a & b);
      endcase
      checks++;
      if (result !== exp || zf !== (exp == 0) || sf !== exp[63]) begin
        failures++;
        $display("FAIL: fn=%0d a=%h b=%h result=%h exp=%h", i % 4, a, b, result, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
