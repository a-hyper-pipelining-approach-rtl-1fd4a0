// ptsc: parallel-to-serial converter in front of the micro-pipeline.
//
// On load it takes the two parallel operands: A goes into a shift register whose bit 0 feeds the
// pipeline, and B into a hold register that drives the multiplicand inputs of the pipes. On every
// other step the A register shifts right with zero fill. So a_ser gives a_0 .. a_{N-1} on the N
// steps after the load, then zeros, which flush the pipeline. DET makes the converter step on
// both clock edges, in time with double-edge pipes.
//
// The reference design names this converter; its shift/hold structure is this design's own.
//
// Interface: load, a, b in; a_ser (serial multiplier bit), b_hold (multiplicand) out.
// Timing:    a_ser = a_k during the k-th step after the load step (k = 0 .. N-1).
module ptsc #(
  parameter int unsigned N   = 32,
  parameter bit          DET = 1'b1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         a_ser,
  output logic [N-1:0] b_hold
);

  logic [N-1:0] a_sr_q, a_sr_d, b_d;

  always_comb begin
    if (load) begin
      a_sr_d = a;
      b_d    = b;
    end else begin
      a_sr_d = {1'b0, a_sr_q[N-1:1]};
      b_d    = b_hold;
    end
  end

  step_reg #(.W(N), .DET(DET)) u_a_sr (.clk(clk), .rst(rst), .d(a_sr_d), .q(a_sr_q));
  step_reg #(.W(N), .DET(DET)) u_b    (.clk(clk), .rst(rst), .d(b_d),    .q(b_hold));

  assign a_ser = a_sr_q[0];

endmodule
