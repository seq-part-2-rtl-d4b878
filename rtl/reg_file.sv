// reg_file: the Y86-64 register file.
//
// Fifteen 64-bit registers, %rax .. %r14 (numbers 0..14).  Two read ports:
// reg_outputA = R[reg_srcA] and reg_outputB = R[reg_srcB], combinational, so
// a value appears in the same cycle as its register number.  Two write ports:
// R[reg_dstE] <= reg_inputE and R[reg_dstM] <= reg_inputM at the rising edge.
// Register number 15 (REG_NONE) means "no register": reading it gives 0 and
// writing it is ignored.  All registers reset to zero.  When both write ports
// name the same register the M port wins; that priority, and the reset, are
// this design's choices.
module reg_file
  import y86_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  regnum_t reg_srcA,
  input  regnum_t reg_srcB,
  input  regnum_t reg_dstE,
  input  regnum_t reg_dstM,
  input  word_t   reg_inputE,
  input  word_t   reg_inputM,
  output word_t   reg_outputA,
  output word_t   reg_outputB
);

  word_t regs [NUM_REGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else begin
      if (reg_dstE != REG_NONE) regs[reg_dstE] <= reg_inputE;
      if (reg_dstM != REG_NONE) regs[reg_dstM] <= reg_inputM;
    end
  end

  always_comb begin
    reg_outputA = (reg_srcA == REG_NONE) ? '0 : regs[reg_srcA];
    reg_outputB = (reg_srcB == REG_NONE) ? '0 : regs[reg_srcB];
  end

endmodule
