// nopjmp_cpu: single-cycle processor for nop, jmp and halt.
//
// The icode selects the next PC (valP): nop goes to thePc + 1, jmp (icode 7)
// to its 64-bit destination in bits 71:8 of the fetched word, and any other
// code to the marker value 0xBADBADBAD.  nop and jmp give STAT_AOK, halt
// STAT_HLT, anything else STAT_INS.  Every instruction takes one cycle; on a
// non-AOK status the machine stops with the PC held at that instruction.
// The jump condition (ifun) is ignored: every icode-7 instruction jumps.
// Holding the PC after a stop, and the load port, are this design's choices.
module nopjmp_cpu
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

  localparam word_t BAD_PC = 64'h0000_000B_ADBA_DBAD;

  word_t  P_thePc, p_thePc, valP;
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
    ins = decode(i10bytes);
    case (ins.icode)
      I_NOP:   valP = P_thePc + 64'd1;
      I_JXX:   valP = ins.dest;
      default: valP = BAD_PC;
    endcase
    p_thePc = valP;
    if      (ins.icode == I_NOP || ins.icode == I_JXX) Stat = STAT_AOK;
    else if (ins.icode == I_HALT)                      Stat = STAT_HLT;
    else                                               Stat = STAT_INS;
    commit  = running && (Stat == STAT_AOK);
    pc      = P_thePc;
  end

endmodule
