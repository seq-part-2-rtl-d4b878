// add_cpu: single-cycle processor that adds registers.
//
// Every instruction is taken as a two-byte "add rA, rB": rA (bits 15:12) and
// rB (bits 11:8) address the two read ports of the register file, the ALU adds
// the two values, and the sum is written back to rB through the E write port
// at the rising edge; the PC advances by two.  The status is STAT_AOK for the
// OPq icode (6), STAT_HLT for halt and STAT_INS otherwise; the function code is
// decoded but not used, so every OPq adds.  The status rule is this design's
// choice.  On a non-AOK status nothing is written and the machine stops.
module add_cpu
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 8192
) (
  input  logic      clk,
  input  logic      rst,
  input  mem_load_t load,
  output word_t     pc,
  output stat_e     stat
);

  word_t   P_thePc, p_thePc;
  iword_t  i10bytes;
  instr_t  ins;
  stat_e   Stat;
  logic    running, commit;
  regnum_t reg_srcA, reg_srcB, reg_dstE;
  word_t   reg_outputA, reg_outputB, reg_inputE;
  logic    zf, sf;

  reg_bank #(.WIDTH(WORD_W), .INIT('0)) pP (
    .clk, .rst, .en(commit), .d(p_thePc), .q(P_thePc)
  );

  instr_mem #(.MEM_BYTES(MEM_BYTES)) u_imem (
    .clk, .load, .pc(P_thePc), .i10bytes
  );

  reg_file u_rf (
    .clk, .rst,
    .reg_srcA, .reg_srcB, .reg_dstE, .reg_dstM(REG_NONE),
    .reg_inputE, .reg_inputM('0),
    .reg_outputA, .reg_outputB
  );

  alu u_alu (
    .fn(ALU_ADD), .a(reg_outputA), .b(reg_outputB),
    .result(reg_inputE), .zf, .sf
  );

  stat_reg u_stat (.clk, .rst, .stat_in(Stat), .stat_q(stat), .running);

  always_comb begin
    ins      = decode(i10bytes);
    p_thePc  = P_thePc + 64'd2;
    reg_srcA = ins.rA;
    reg_srcB = ins.rB;
    if      (ins.icode == I_OPQ)  Stat = STAT_AOK;
    else if (ins.icode == I_HALT) Stat = STAT_HLT;
    else                          Stat = STAT_INS;
    commit   = running && (Stat == STAT_AOK);
    reg_dstE = commit ? ins.rB : REG_NONE;
    pc       = P_thePc;
  end

endmodule
