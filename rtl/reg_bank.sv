// reg_bank: a register bank "xY" of the single-cycle processors.
//
// A set of fields, packed into one vector of WIDTH bits, that is copied from
// the input side (x_...) to the output side (Y_...) at every rising clock edge.
// Every bank has an initial value, INIT, loaded by a synchronous reset.  The
// input side is read between edges, so a value written now is visible on q
// during the whole next cycle.
//
// en freezes the bank; the processors use it only to stop after the status
// leaves AOK (a stall signal in general is not modelled).  The synchronous
// reset and the en input are this design's choices.
module reg_bank #(
  parameter int unsigned       WIDTH = 64,
  parameter logic [WIDTH-1:0]  INIT  = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= INIT;
    else if (en) q <= d;
  end

endmodule
