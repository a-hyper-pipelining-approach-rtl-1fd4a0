// stpc: serial-to-parallel converter behind the micro-pipeline.
//
// A W-bit shift register that, on each step with shift_en high, shifts right and puts ser_in in
// its most significant bit. Product bits arrive least significant first, so after W enabled
// steps bit i of par_out holds the i-th serial bit. When shift_en is low it holds its value,
// so the finished product stays on par_out until the next operation. DET makes it step on
// both clock edges.
//
// The reference design names this converter; its structure is this design's own.
//
// Interface: shift_en, ser_in in; par_out out. Timing: one step per bit.
module stpc #(
  parameter int unsigned W   = 64,
  parameter bit          DET = 1'b1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         shift_en,
  input  logic         ser_in,
  output logic [W-1:0] par_out
);

  logic [W-1:0] sr_d;

  always_comb begin
    if (shift_en) sr_d = {ser_in, par_out[W-1:1]};
    else          sr_d = par_out;
  end

  step_reg #(.W(W), .DET(DET)) u_sr (.clk(clk), .rst(rst), .d(sr_d), .q(par_out));

endmodule
