// nop_cpu: the smallest single-cycle processor, which treats every
// instruction as a one-byte nop.
//
// A 64-bit PC register bank (field thePc, initial value 0) drives the
// instruction memory; an adder feeds thePc + 1 back as the next PC, so one
// byte is consumed per cycle.  The status is always STAT_AOK, so the machine
// never stops on its own.  The fetched word is brought out on i10bytes since
// nothing inside uses it.  The program is written through the load port while
// rst is held; the load port and the synchronous reset are this design's
// choices.  Timing: PC advances at every rising edge after reset.
module nop_cpu
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 8192
) (
  input  logic      clk,
  input  logic      rst,
  input  mem_load_t load,
  output word_t     pc,
  output iword_t    i10bytes,
  output stat_e     stat
);

  word_t P_thePc, p_thePc;
  stat_e Stat;
  logic  running, commit;

  reg_bank #(.WIDTH(WORD_W), .INIT('0)) pP (
    .clk, .rst, .en(commit), .d(p_thePc), .q(P_thePc)
  );

  instr_mem #(.MEM_BYTES(MEM_BYTES)) u_imem (
    .clk, .load, .pc(P_thePc), .i10bytes
  );

  stat_reg u_stat (.clk, .rst, .stat_in(Stat), .stat_q(stat), .running);

  always_comb begin
    p_thePc = P_thePc + 64'd1;
    Stat    = STAT_AOK;
    commit  = running && (Stat == STAT_AOK);
    pc      = P_thePc;
  end

endmodule
