// micro_pipeline: the single micro-pipeline of the hybrid multiplier (a serial-parallel
// multiplier).
//
// N pipes stand in a row, one per multiplicand bit. The multiplier A enters serially, least
// significant bit first, one bit per step, broadcast to every pipe. Pipe i adds a_ser & b[i]
// to the stored sum of pipe i+1 and its own stored carry; the top pipe gets 0 in place of a
// neighbour's sum. Each step the whole carry-save accumulator therefore computes
// acc = acc/2 + a_t*B, and the bit that falls off the low end is the next product bit.
// Because addition and shifting happen in the same single pipeline, no separate shifter or
// final carry-propagate adder is needed.
//
// The reference design describes a single pipeline that adds and shifts at once; organising it
// as this carry-save serial-parallel row, with N pipes, is this design's reading of it.
//
// Interface: a_ser (multiplier bit), b (multiplicand, held for the whole operation),
//            p_ser (product bit, = stored sum of pipe 0).
// Timing:    after the step that consumes a_t (t = 0 .. 2N-1, with a_t = 0 for t >= N),
//            p_ser holds product bit p_t. A product takes 2N steps: N operand bits, then N zero
//            bits that flush the accumulator. After those 2N steps every stored carry is 0 and
//            only pipe 0 may still hold a 1, which no pipe reads, so the next operation can
//            follow at once without clearing.
module micro_pipeline
  import hm_pkg::*;
#(
  parameter int unsigned N   = HM_WIDTH,
  parameter mem_style_e  MEM = MEM_DET_COMB
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         a_ser,
  input  logic [N-1:0] b,
  output logic         p_ser
);

  logic [N:0]   sum_q;   // sum_q[N] is the constant 0 above the top pipe
  logic [N-1:0] carry_q; // internal to each pipe; brought out only for visibility

  assign sum_q[N] = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_pipe
    pipe #(.MEM(MEM)) u_pipe (
      .clk    (clk),
      .rst    (rst),
      .a_ser  (a_ser),
      .b_bit  (b[i]),
      .sum_in (sum_q[i+1]),
      .sum_q  (sum_q[i]),
      .carry_q(carry_q[i])
    );
  end

  assign p_ser = sum_q[0];

endmodule
