// y86_seq_top: the family of single-cycle Y86-64 processors, side by side.
//
// Each processor is a separate machine with its own instruction memory (and,
// where it has one, register file and data memory), its own byte-wide
// program-load port and its own PC and status outputs; they share only the
// clock and the synchronous reset.  From the smallest to the largest:
//   count   a free-running register fed back through an add-1 unit
//   nop     PC + 1 each cycle, never stops        (fetched word brought out)
//   nophalt nop and halt
//   nopjmp  nop, jmp and halt
//   add     every instruction adds rA into rB
//   mov     rrmovq, irmovq, rmmovq, mrmovq
//   seq     the whole Y86-64 instruction set
// Load a program by driving a *_load port (one byte per clock) while rst is
// high, then release rst: each machine starts at address 0 and executes one
// instruction per cycle until its status leaves STAT_AOK.  Putting the
// machines in one top, and the load ports, are this design's choices.
module y86_seq_top
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 8192
) (
  input  logic      clk,
  input  logic      rst,

  input  mem_load_t seq_load,
  output word_t     seq_pc,
  output stat_e     seq_stat,

  input  mem_load_t mov_load,
  output word_t     mov_pc,
  output stat_e     mov_stat,

  input  mem_load_t add_load,
  output word_t     add_pc,
  output stat_e     add_stat,

  input  mem_load_t nopjmp_load,
  output word_t     nopjmp_pc,
  output stat_e     nopjmp_stat,

  input  mem_load_t nophalt_load,
  output word_t     nophalt_pc,
  output stat_e     nophalt_stat,

  input  mem_load_t nop_load,
  output word_t     nop_pc,
  output iword_t    nop_i10bytes,
  output stat_e     nop_stat,

  output word_t     count
);

  seq_cpu #(.MEM_BYTES(MEM_BYTES)) u_seq (
    .clk, .rst, .load(seq_load), .pc(seq_pc), .stat(seq_stat)
  );

  mov_cpu #(.MEM_BYTES(MEM_BYTES)) u_mov (
    .clk, .rst, .load(mov_load), .pc(mov_pc), .stat(mov_stat)
  );

  add_cpu #(.MEM_BYTES(MEM_BYTES)) u_add (
    .clk, .rst, .load(add_load), .pc(add_pc), .stat(add_stat)
  );

  nopjmp_cpu #(.MEM_BYTES(MEM_BYTES)) u_nopjmp (
    .clk, .rst, .load(nopjmp_load), .pc(nopjmp_pc), .stat(nopjmp_stat)
  );

  nophalt_cpu #(.MEM_BYTES(MEM_BYTES)) u_nophalt (
    .clk, .rst, .load(nophalt_load), .pc(nophalt_pc), .stat(nophalt_stat)
  );

  nop_cpu #(.MEM_BYTES(MEM_BYTES)) u_nop (
    .clk, .rst, .load(nop_load), .pc(nop_pc), .i10bytes(nop_i10bytes), .stat(nop_stat)
  );

  counter #(.WIDTH(WORD_W)) u_count (.clk, .rst, .count);

endmodule
