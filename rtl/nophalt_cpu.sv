// nophalt_cpu: single-cycle processor for nop and halt.
//
// As nop_cpu, the PC register bank (thePc, initial 0) is advanced by one byte
// per cycle, but the icode (bits 7:4 of the fetched word) now sets the
// status: nop gives STAT_AOK, halt STAT_HLT, and any other code STAT_INS.
// The status register latches the first non-AOK status and stops the machine;
// the PC is then left at the address of the instruction that stopped it
// (holding it there is this design's choice).
module nophalt_cpu
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

  word_t  P_thePc, p_thePc;
  iword_t i10bytes;
  instr_t ins;
  stat_e  Stat;
  logic   running, commit;

  reg_bank #(.WIDTH(WORD_W), .INIT('0)) pP (
    .clk, .rst, .en(commit), .d(p_thePc), .q(P_thePc)
  );

  instr_mem #(.MEM_BYTES(MEM_BYTES)) u_imem (
    .clk, .load, .pc(P_thePc), .i10bytes
  );

  stat_reg u_stat (.clk, .rst, .stat_in(Stat), .stat_q(stat), .running);

  always_comb begin
    ins     = decode(i10bytes);
    p_thePc = P_thePc + 64'd1;
    if      (ins.icode == I_NOP)  Stat = STAT_AOK;
    else if (ins.icode == I_HALT) Stat = STAT_HLT;
    else                          Stat = STAT_INS;
    commit  = running && (Stat == STAT_AOK);
    pc      = P_thePc;
  end

endmodule
