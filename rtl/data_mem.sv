// data_mem: the data memory of the Y86-64 processors.
//
// A byte array of MEM_BYTES bytes accessed as 64-bit little-endian words at
// any byte address mem_addr.  With mem_readbit high, mem_output holds the word
// in the same cycle (combinational read); otherwise it is zero.  With
// mem_writebit high, mem_input is written at the next rising edge, so the new
// value is seen from the next cycle on.  Bytes at or above MEM_BYTES read as
// zero and ignore writes.
//
// A byte-wide load port, also written at the rising edge, fills the memory
// with the program image before it runs; it takes precedence over a processor
// write to the same byte.  Size, load port and out-of-range behaviour are this
// design's choices.  An assertion checks that read and write are not asked for
// in the same cycle.
module data_mem
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 8192
) (
  input  logic      clk,
  input  mem_load_t load,
  input  word_t     mem_addr,
  input  word_t     mem_input,
  input  logic      mem_readbit,
  input  logic      mem_writebit,
  output word_t     mem_output
);

  localparam int unsigned AW = $clog2(MEM_BYTES);

  logic [7:0] mem [MEM_BYTES];

  always_ff @(posedge clk) begin
    word_t a;
    if (mem_writebit) begin
      for (int k = 0; k < 8; k++) begin
        a = mem_addr + word_t'(k);
        if (a < WORD_W'(MEM_BYTES)) mem[a[AW-1:0]] <= mem_input[8*k +: 8];
      end
    end
    if (load.en && load.addr < WORD_W'(MEM_BYTES))
      mem[load.addr[AW-1:0]] <= load.data;
  end

  always_comb begin
    word_t a;
    a          = mem_addr;
    mem_output = '0;
    if (mem_readbit) begin
      for (int k = 0; k < 8; k++) begin
        a = mem_addr + word_t'(k);
        mem_output[8*k +: 8] = (a < WORD_W'(MEM_BYTES)) ? mem[a[AW-1:0]] : 8'h00;
      end
    end
  end

  always_ff @(posedge clk) begin
    assert (!(mem_readbit && mem_writebit))
      else $error("data_mem: read and write requested in the same cycle");
  end

endmodule
