// counter: the "count" register fed back through an "add 1" unit.
//
// The simplest state machine: a register whose next value is its present
// value plus one, so it advances by one at every rising clock edge.  A
// synchronous reset to zero is this design's choice.
module counter #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst,
  output logic [WIDTH-1:0] count
);

  logic [WIDTH-1:0] count_next;

  always_comb count_next = count + WIDTH'(1);

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count_next;
  end

endmodule
