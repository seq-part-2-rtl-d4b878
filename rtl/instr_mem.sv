// instr_mem: the instruction (program) memory.
//
// A byte array of MEM_BYTES bytes.  Reading is combinational: for input pc the
// output i10bytes holds the ten bytes at pc .. pc+9 as one little-endian 80-bit
// number, so bit 0 is the least significant bit of the byte at pc.  Ten bytes
// is the length of the longest instruction; shorter instructions ignore the
// upper bits.  Bytes at addresses at or above MEM_BYTES read as zero.
//
// The array is filled through the byte-wide load port, written at the rising
// edge; the processor itself never writes it.  The memory size, the load port
// and the out-of-range behaviour are this design's choices.
module instr_mem
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 8192
) (
  input  logic      clk,
  input  mem_load_t load,
  input  word_t     pc,
  output iword_t    i10bytes
);

  localparam int unsigned AW = $clog2(MEM_BYTES);

  logic [7:0] mem [MEM_BYTES];

  always_ff @(posedge clk) begin
    if (load.en && load.addr < WORD_W'(MEM_BYTES))
      mem[load.addr[AW-1:0]] <= load.data;
  end

  always_comb begin
    word_t a;
    for (int k = 0; k < IBYTES; k++) begin
      a = pc + word_t'(k);
      i10bytes[8*k +: 8] = (a < WORD_W'(MEM_BYTES)) ? mem[a[AW-1:0]] : 8'h00;
    end
  end

endmodule
