// pipe_mem_sep: separate memory of one multiplier pipe.
//
// A pipe stores two bits: the sum of its full adder (shifted on to the next pipe) and its carry
// out (fed back to its own carry in). In the separate-memory form each bit has its own storage
// element with its own clock and reset connection. DET selects double-edge (1) or
// single-edge (0) storage elements.
//
// This structure follows the reference design.
//
// Interface: sum_d/carry_d in, sum_q/carry_q out. Timing: one step (see step_reg) of delay.
module pipe_mem_sep #(
  parameter bit DET = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic sum_d,
  input  logic carry_d,
  output logic sum_q,
  output logic carry_q
);

  step_reg #(.W(1), .DET(DET)) u_sum   (.clk(clk), .rst(rst), .d(sum_d),   .q(sum_q));
  step_reg #(.W(1), .DET(DET)) u_carry (.clk(clk), .rst(rst), .d(carry_d), .q(carry_q));

endmodule
