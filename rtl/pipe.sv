// pipe: one stage ("pipe") of the single micro-pipeline multiplier.
//
// A pipe is a full adder plus two stored bits. Its inputs are the serial multiplier bit a_ser, the
// pipe's own multiplicand bit b_bit and the stored sum of the next more significant pipe
// (sum_in). The adder sums the partial product a_ser & b_bit, sum_in and the pipe's own stored
// carry (the Cout -> Cin loop). The new sum and carry are stored each step, so the pipe acts like
// a serial adder. The sum moves one pipe towards the least significant end every step, which
// is the shift of the add-and-shift multiplication.
//
// The pipe's contents (AND, full adder, sum and carry storage, carry loop) follow the reference
// design.
//
// MEM picks the storage: separate or combined memory, single- or double-edge triggered.
// Interface: a_ser, b_bit, sum_in in; sum_q (stored sum), carry_q (stored carry) out.
// Timing:    one step of latency from the inputs to sum_q/carry_q.
module pipe
  import hm_pkg::*;
#(
  parameter mem_style_e MEM = MEM_DET_COMB
) (
  input  logic clk,
  input  logic rst,
  input  logic a_ser,
  input  logic b_bit,
  input  logic sum_in,
  output logic sum_q,
  output logic carry_q
);

  logic pp, fa_sum, fa_carry;

  // AND partial product and full adder
  always_comb begin
    pp       = a_ser & b_bit;
    fa_sum   = pp ^ sum_in ^ carry_q;
    fa_carry = (pp & sum_in) | (pp & carry_q) | (sum_in & carry_q);
  end

  if (mem_is_comb(MEM)) begin : g_comb
    pipe_mem_comb #(.DET(mem_is_det(MEM))) u_mem (
      .clk(clk), .rst(rst), .sum_d(fa_sum), .carry_d(fa_carry), .sum_q(sum_q), .carry_q(carry_q)
    );
  end else begin : g_sep
    pipe_mem_sep #(.DET(mem_is_det(MEM))) u_mem (
      .clk(clk), .rst(rst), .sum_d(fa_sum), .carry_d(fa_carry), .sum_q(sum_q), .carry_q(carry_q)
    );
  end

endmodule
