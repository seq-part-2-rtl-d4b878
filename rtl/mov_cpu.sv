// mov_cpu: single-cycle processor for the four Y86-64 moves.
//
//   rrmovq rA, rB     (20 rA:rB)          R[rB] <- R[rA]               2 bytes
//   irmovq V, rB      (30 F:rB V)         R[rB] <- V                  10 bytes
//   rmmovq rA, D(rB)  (40 rA:rB D)        M[D + R[rB]] <- R[rA]       10 bytes
//   mrmovq D(rB), rA  (50 rA:rB D)        R[rA] <- M[D + R[rB]]       10 bytes
//
// The fetched word is split into icode, rA, rB and the constant V/D.  The
// register file reads rA on port A and rB on port B.  The ALU adds the
// constant (aluA) to R[rB] (aluB) to form the memory address of rmmovq and
// mrmovq.  Multiplexers choose the next PC (+2 or +10), the E write port
// (rB, written with R[rA] or V), the M write port (rA, written with the loaded
// word) and the data-memory input (R[rA]).  All reads and the ALU work within
// the cycle; the PC, register and memory writes happen at the next rising
// edge.  halt (00) stops the machine with STAT_HLT, any other code with
// STAT_INS; supporting halt is this design's addition so a program can end.
// rrmovq is taken as unconditional: its ifun is not checked.
module mov_cpu
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
  regnum_t reg_srcA, reg_srcB, reg_dstE, reg_dstM;
  word_t   reg_outputA, reg_outputB, reg_inputE, reg_inputM;
  word_t   aluA, aluB, valE;
  logic    zf, sf;
  word_t   mem_addr, mem_input, mem_output;
  logic    mem_readbit, mem_writebit;

  reg_bank #(.WIDTH(WORD_W), .INIT('0)) pP (
    .clk, .rst, .en(commit), .d(p_thePc), .q(P_thePc)
  );

  instr_mem #(.MEM_BYTES(MEM_BYTES)) u_imem (
    .clk, .load, .pc(P_thePc), .i10bytes
  );

  reg_file u_rf (
    .clk, .rst,
    .reg_srcA, .reg_srcB, .reg_dstE, .reg_dstM,
    .reg_inputE, .reg_inputM,
    .reg_outputA, .reg_outputB
  );

  alu u_alu (.fn(ALU_ADD), .a(aluA), .b(aluB), .result(valE), .zf, .sf);

  data_mem #(.MEM_BYTES(MEM_BYTES)) u_dmem (
    .clk, .load,
    .mem_addr, .mem_input, .mem_readbit, .mem_writebit, .mem_output
  );

  stat_reg u_stat (.clk, .rst, .stat_in(Stat), .stat_q(stat), .running);

  always_comb begin
    ins = decode(i10bytes);

    case (ins.icode)
      I_RRMOVQ, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ: Stat = STAT_AOK;
      I_HALT:                                 Stat = STAT_HLT;
      default:                                Stat = STAT_INS;
    endcase
    commit = running && (Stat == STAT_AOK);

    // PC MUX
    p_thePc = (ins.icode == I_RRMOVQ) ? P_thePc + 64'd2 : P_thePc + 64'd10;

    // register reads
    reg_srcA = ins.rA;
    reg_srcB = ins.rB;

    // aluA / aluB MUXes: address = D + R[rB]
    aluA = ins.valC;
    aluB = reg_outputB;

    // data memory
    mem_addr     = valE;
    mem_input    = reg_outputA;                        // dmemIn MUX
    mem_readbit  = (ins.icode == I_MRMOVQ);
    mem_writebit = commit && (ins.icode == I_RMMOVQ);

    // dstE MUX and its value
    reg_dstE   = REG_NONE;
    reg_inputE = reg_outputA;
    if (commit && ins.icode == I_RRMOVQ) begin
      reg_dstE   = ins.rB;
      reg_inputE = reg_outputA;
    end else if (commit && ins.icode == I_IRMOVQ) begin
      reg_dstE   = ins.rB;
      reg_inputE = ins.valC;
    end

    // dstM MUX
    reg_dstM   = (commit && ins.icode == I_MRMOVQ) ? ins.rA : REG_NONE;
    reg_inputM = mem_output;

    pc = P_thePc;
  end

endmodule
