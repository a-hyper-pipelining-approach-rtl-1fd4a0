// pipe_mem_comb: combined memory of one multiplier pipe.
//
// The register-retiming (hyper-pipelining) form of the pipe memory: the sum and carry storage of
// a pipe are merged into a single 2-bit storage element with one clock and one reset connection,
// which shortens the clock wiring of the stage. Bit 0 holds the sum, bit 1 the carry.
// DET selects a double-edge (1) or single-edge (0) element.
//
// Merging the two bits follows the reference design; the bit order is this design's own.
//
// Interface: sum_d/carry_d in, sum_q/carry_q out. Timing: one step (see step_reg) of delay.
module pipe_mem_comb #(
  parameter bit DET = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic sum_d,
  input  logic carry_d,
  output logic sum_q,
  output logic carry_q
);

  logic [1:0] mem_q;

  step_reg #(.W(2), .DET(DET)) u_mem (
    .clk(clk), .rst(rst), .d({carry_d, sum_d}), .q(mem_q)
  );

  assign sum_q   = mem_q[0];
  assign carry_q = mem_q[1];

endmodule
