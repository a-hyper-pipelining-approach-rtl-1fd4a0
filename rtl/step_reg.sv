// step_reg: a W-bit register that advances once per pipeline step.
//
// With DET = 0 a step is a rising clock edge (set_dff); with DET = 1 a step is every clock edge
// (det_dff). The converters and the sequencer around the micro-pipeline are built from this
// register so that they keep pace with the pipes in either clocking style.
//
// Interface: clk, rst (active high, asynchronous), d, q. Timing: q follows d one step later.
module step_reg #(
  parameter int unsigned    W       = 1,
  parameter bit             DET     = 1'b1,
  parameter logic [W-1:0]   RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DET) begin : g_det
    det_dff #(.W(W), .RST_VAL(RST_VAL)) u_reg (.clk(clk), .rst(rst), .d(d), .q(q));
  end else begin : g_set
    set_dff #(.W(W), .RST_VAL(RST_VAL)) u_reg (.clk(clk), .rst(rst), .d(d), .q(q));
  end

endmodule
