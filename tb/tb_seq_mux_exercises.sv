// tb_seq_mux_exercises: the MUX settings of seq_cpu for single instructions.
//
// For addq %r8,%r9, rmmovq %r8,0x20(%r9) and call, checks what the PC, dstE,
// dstM, aluA, aluB and dmemIn multiplexers select, by comparing the values on
// their outputs with the register, constant and PC values they must pass on.
// Each instruction is preceded by irmovq instructions that give %r8, %r9 and
// %rsp known values, so every selected input is distinct.
module tb_seq_mux_exercises;
  import y86_pkg::*;
  localparam int unsigned N = 256;
  logic clk = 0, rst = 1;
  mem_load_t load = '0;
  word_t pc;
  stat_e stat;
  int checks = 0, failures = 0;
  logic [7:0] img [N];
  int a;

  seq_cpu #(.MEM_BYTES(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic put(input logic [7:0] b [$]);
    foreach (b[i]) begin img[a] = b[i]; a++; end
  endtask

  task automatic put64(input word_t v);
    for (int k = 0; k < 8; k++) begin img[a] = v[8*k +: 8]; a++; end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (img[i]) img[i] = 8'h00;
    a = 0;
    put('{8'h30, 8'hF8}); put64(64'h11);     // 0x00 irmovq $0x11, %r8
    put('{8'h30, 8'hF9}); put64(64'h40);     // 0x0a irmovq $0x40, %r9
    put('{8'h30, 8'hF4}); put64(64'hC0);     // 0x14 irmovq $0xc0, %rsp
    put('{8'h60, 8'h89});                    // 0x1e addq %r8, %r9
    put('{8'h40, 8'h89}); put64(64'h20);     // 0x20 rmmovq %r8, 0x20(%r9)
    put('{8'h80}); put64(64'h80);            // 0x2a call 0x80
    img[16'h80] = 8'h00;                     // 0x80 halt
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      load = '{en: 1'b1, addr: word_t'(i), data: img[i]};
    end
    @(negedge clk); load.en = 1'b0; @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);

    // addq %r8, %r9
    check(pc == 64'h1e, "at addq");
    check(dut.aluA == 64'h11 && dut.aluB == 64'h40, "addq: aluA = R[rA], aluB = R[rB]");
    check(dut.reg_dstE == 4'h9 && dut.valE == 64'h51, "addq: dstE = rB, valE = sum");
    check(dut.reg_dstM == REG_NONE && !dut.mem_writebit && !dut.mem_readbit, "addq: no dstM, no memory");
    check(dut.p_thePc == 64'h20, "addq: PC = valP");
    @(negedge clk);

    // rmmovq %r8, 0x20(%r9)   (R[r9] is now 0x51)
    check(dut.aluA == 64'h20 && dut.aluB == 64'h51, "rmmovq: aluA = D, aluB = R[rB]");
    check(dut.mem_addr == 64'h71 && dut.mem_writebit, "rmmovq: address = valE, write");
    check(dut.mem_input == 64'h11, "rmmovq: dmemIn = R[rA]");
    check(dut.reg_dstE == REG_NONE && dut.reg_dstM == REG_NONE, "rmmovq: no register written");
    check(dut.p_thePc == 64'h2a, "rmmovq: PC = valP");
    @(negedge clk);

    // call 0x80
    check(dut.aluA == -64'sd8 && dut.aluB == 64'hC0, "call: aluA = -8, aluB = R[%rsp]");
    check(dut.reg_dstE == 4'h4 && dut.valE == 64'hB8, "call: dstE = %rsp, valE = %rsp - 8");
    check(dut.mem_addr == 64'hB8 && dut.mem_writebit, "call: address = valE, write");
    check(dut.mem_input == 64'h33, "call: dmemIn = valP");
    check(dut.p_thePc == 64'h80, "call: PC = Dest");
    @(negedge clk);
    check(dut.u_dmem.mem[8'hB8] == 8'h33 && dut.u_dmem.mem[8'h71] == 8'h11, "stores landed");
    @(negedge clk);
    check(stat == STAT_HLT, "halt reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
