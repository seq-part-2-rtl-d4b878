// seq_cpu: single-cycle ("SEQ") Y86-64 processor for the whole instruction
// set of the encoding table: halt, nop, rrmovq/cmovXX, irmovq, rmmovq,
// mrmovq, OPq (add, sub, and, xor), jXX, call, ret, pushq, popq.
//
// One instruction completes per clock cycle.  From the rising edge that
// loads a new PC, everything is combinational: fetch (10 bytes from the
// instruction memory, split into icode, ifun, rA, rB, valC, and valP = PC plus
// the instruction length), decode (two register reads), execute (the ALU and
// the condition test), memory (one 64-bit read or write) and the choice of
// the next PC.  At the next rising edge the PC, the condition codes, up to two
// registers and the data memory are written together.
//
// The six multiplexers that steer it:
//   PC     valP; valC for call and a taken jXX; valM for ret
//   dstE   rB for rrmovq (when its condition holds), irmovq, OPq;
//          %rsp for pushq, popq, call, ret; none otherwise
//   dstM   rA for mrmovq and popq
//   aluA   valA for rrmovq and OPq; valC for irmovq, rmmovq, mrmovq;
//          -8 for pushq and call; +8 for popq and ret
//   aluB   valB for OPq, rmmovq, mrmovq, pushq, popq, call, ret; 0 otherwise
//   dmemIn valA for rmmovq and pushq; valP for call
// The memory address is valE, except for popq and ret, which read at valA
// (the old %rsp).  popq %rsp leaves the loaded value in %rsp, since the
// register file's M port wins over its E port.
//
// Condition codes are the zero flag and the sign flag only, set by OPq; the
// conditions are le (SF|ZF), l (SF), e (ZF), ne (!ZF), ge (!SF), g (!SF&!ZF),
// always (0).  They reset to ZF=1, SF=0.  Status: STAT_HLT for halt,
// STAT_INS for an unknown icode or function code, STAT_ADR for a fetch or
// data access that reaches past the end of memory, STAT_AOK otherwise.  On
// any status other than AOK nothing is written and the machine stops.
// The instruction set and its encodings follow the Y86-64 table; the
// per-instruction semantics, the flag set of two, the flag reset value and the
// STAT_ADR rule are the usual Y86-64 ones, taken as this design's choices.
module seq_cpu
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

  localparam regnum_t RSP = 4'h4;

  typedef struct packed {
    logic zf;
    logic sf;
  } cc_t;

  localparam cc_t CC_INIT = '{zf: 1'b1, sf: 1'b0};

  word_t   P_thePc, p_thePc, valP;
  iword_t  i10bytes;
  instr_t  ins;
  word_t   valC;
  stat_e   Stat;
  logic    running, commit;
  logic    valid_ins, fetch_ok, dmem_ok, cnd;
  cc_t     C_cc, c_cc;
  regnum_t reg_srcA, reg_srcB, reg_dstE, reg_dstM;
  word_t   valA, valB, valE, valM;
  word_t   aluA, aluB;
  alu_fn_e alufun;
  logic    alu_zf, alu_sf;
  word_t   mem_addr, mem_input;
  logic    mem_readbit, mem_writebit;

  reg_bank #(.WIDTH(WORD_W), .INIT('0)) pP (
    .clk, .rst, .en(commit), .d(p_thePc), .q(P_thePc)
  );

  reg_bank #(.WIDTH($bits(cc_t)), .INIT(CC_INIT)) cC (
    .clk, .rst, .en(commit && ins.icode == I_OPQ), .d(c_cc), .q(C_cc)
  );

  instr_mem #(.MEM_BYTES(MEM_BYTES)) u_imem (
    .clk, .load, .pc(P_thePc), .i10bytes
  );

  reg_file u_rf (
    .clk, .rst,
    .reg_srcA, .reg_srcB, .reg_dstE, .reg_dstM,
    .reg_inputE(valE), .reg_inputM(valM),
    .reg_outputA(valA), .reg_outputB(valB)
  );

  alu u_alu (.fn(alufun), .a(aluA), .b(aluB), .result(valE), .zf(alu_zf), .sf(alu_sf));

  data_mem #(.MEM_BYTES(MEM_BYTES)) u_dmem (
    .clk, .load,
    .mem_addr, .mem_input, .mem_readbit, .mem_writebit, .mem_output(valM)
  );

  stat_reg u_stat (.clk, .rst, .stat_in(Stat), .stat_q(stat), .running);

  always_comb begin
    // ---------------- fetch
    ins = decode(i10bytes);
    case (ins.icode)
      I_HALT, I_NOP, I_RET:                 valP = P_thePc + 64'd1;
      I_RRMOVQ, I_OPQ, I_PUSHQ, I_POPQ:     valP = P_thePc + 64'd2;
      I_JXX, I_CALL:                        valP = P_thePc + 64'd9;
      default:                              valP = P_thePc + 64'd10;
    endcase
    valC = (ins.icode == I_JXX || ins.icode == I_CALL) ? ins.dest : ins.valC;

    case (ins.icode)
      I_HALT, I_NOP, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ,
      I_CALL, I_RET, I_PUSHQ, I_POPQ:       valid_ins = (ins.ifun == 4'h0);
      I_RRMOVQ, I_JXX:                      valid_ins = (ins.ifun <= 4'h6);
      I_OPQ:                                valid_ins = (ins.ifun <= 4'h3);
      default:                              valid_ins = 1'b0;
    endcase
    fetch_ok = (valP <= WORD_W'(MEM_BYTES)) && (valP > P_thePc);

    // ---------------- decode
    case (ins.icode)
      I_RRMOVQ, I_RMMOVQ, I_OPQ, I_PUSHQ:   reg_srcA = ins.rA;
      I_POPQ, I_RET:                        reg_srcA = RSP;
      default:                              reg_srcA = REG_NONE;
    endcase
    case (ins.icode)
      I_OPQ, I_RMMOVQ, I_MRMOVQ:            reg_srcB = ins.rB;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:       reg_srcB = RSP;
      default:                              reg_srcB = REG_NONE;
    endcase

    // ---------------- execute
    case (ins.icode)
      I_RRMOVQ, I_OPQ:                      aluA = valA;
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ:         aluA = valC;
      I_CALL, I_PUSHQ:                      aluA = -64'sd8;
      I_RET, I_POPQ:                        aluA = 64'd8;
      default:                              aluA = '0;
    endcase
    case (ins.icode)
      I_RMMOVQ, I_MRMOVQ, I_OPQ, I_CALL,
      I_PUSHQ, I_RET, I_POPQ:               aluB = valB;
      default:                              aluB = '0;
    endcase
    alufun = (ins.icode == I_OPQ) ? alu_fn_e'(ins.ifun) : ALU_ADD;
    c_cc   = '{zf: alu_zf, sf: alu_sf};

    case (ins.ifun)
      4'h0:    cnd = 1'b1;                       // always
      4'h1:    cnd = C_cc.sf | C_cc.zf;          // le
      4'h2:    cnd = C_cc.sf;                    // l
      4'h3:    cnd = C_cc.zf;                    // e
      4'h4:    cnd = !C_cc.zf;                   // ne
      4'h5:    cnd = !C_cc.sf;                   // ge
      4'h6:    cnd = !C_cc.sf && !C_cc.zf;       // g
      default: cnd = 1'b0;
    endcase

    // ---------------- memory
    mem_addr  = (ins.icode == I_POPQ || ins.icode == I_RET) ? valA : valE;
    mem_input = (ins.icode == I_CALL) ? valP : valA;
    case (ins.icode)
      I_MRMOVQ, I_POPQ, I_RET, I_RMMOVQ, I_PUSHQ, I_CALL:
        dmem_ok = (mem_addr <= WORD_W'(MEM_BYTES - 8));
      default:
        dmem_ok = 1'b1;
    endcase

    // ---------------- status
    if (!fetch_ok)                  Stat = STAT_ADR;
    else if (!valid_ins)            Stat = STAT_INS;
    else if (ins.icode == I_HALT)   Stat = STAT_HLT;
    else if (!dmem_ok)              Stat = STAT_ADR;
    else                            Stat = STAT_AOK;
    commit = running && (Stat == STAT_AOK);

    mem_readbit  = (ins.icode == I_MRMOVQ || ins.icode == I_POPQ || ins.icode == I_RET);
    mem_writebit = commit &&
                   (ins.icode == I_RMMOVQ || ins.icode == I_PUSHQ || ins.icode == I_CALL);

    // ---------------- write back
    reg_dstE = REG_NONE;
    reg_dstM = REG_NONE;
    if (commit) begin
      case (ins.icode)
        I_RRMOVQ:                       reg_dstE = cnd ? ins.rB : REG_NONE;
        I_IRMOVQ, I_OPQ:                reg_dstE = ins.rB;
        I_PUSHQ, I_POPQ, I_CALL, I_RET: reg_dstE = RSP;
        default:                        reg_dstE = REG_NONE;
      endcase
      if (ins.icode == I_MRMOVQ || ins.icode == I_POPQ) reg_dstM = ins.rA;
    end

    // ---------------- PC update
    case (ins.icode)
      I_CALL:  p_thePc = valC;
      I_JXX:   p_thePc = cnd ? valC : valP;
      I_RET:   p_thePc = valM;
      default: p_thePc = valP;
    endcase

    pc = P_thePc;
  end

endmodule
