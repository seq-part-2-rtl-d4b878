// stat_reg: the machine status register.
//
// Each cycle the processor computes the status of the instruction it is
// executing (stat_in).  At the rising edge that value is latched into stat_q
// while the machine is still running; once stat_q has left STAT_AOK it holds
// its value until reset and the machine stays stopped.  running is high while
// stat_q is STAT_AOK.  A processor commits an instruction's state updates only
// when running and stat_in is STAT_AOK, so a halting or invalid instruction
// changes nothing but the status.  Holding the status in hardware, rather than
// having a simulator stop the clock, is this design's choice.
module stat_reg
  import y86_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  stat_e stat_in,
  output stat_e stat_q,
  output logic  running
);

  always_ff @(posedge clk) begin
    if (rst)                        stat_q <= STAT_AOK;
    else if (stat_q == STAT_AOK)    stat_q <= stat_in;
  end

  always_comb running = (stat_q == STAT_AOK);

endmodule
