// det_dff: double-edge-triggered (DET) D flip-flop register with asynchronous reset.
//
// A DET flip-flop takes its input on both the rising and the falling clock edge, so it keeps the
// data rate of a single-edge flip-flop at half the clock frequency. As in the classic DET cell it
// is built from two storage halves working in parallel: one captures on the rising edge, the other
// on the falling edge. The classic cell then selects between the halves with a multiplexer steered
// by the clock level. Here the halves instead store d XOR (the other half), and the output is
// the XOR of both halves. After a rising edge q = p ^ n = (d ^ n) ^ n = d, and after a falling
// edge q = p ^ (d ^ p) = d. The behaviour is the same as the multiplexed cell, but the clock
// never drives the datapath, which keeps the output free of clock-level glitches and of
// simulation races between the sampling edge and the select.
//
// The two parallel halves follow the classic DET cell of the reference design; combining them
// by XOR rather than by a clock-steered multiplexer is this design's own choice.
//
// Interface: clk, rst (active high, asynchronous), d, q.
// Timing:    q follows d at the next clock edge of either polarity.
module det_dff #(
  parameter int unsigned    W       = 1,
  parameter logic [W-1:0]   RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] pos_half;  // written on rising edges
  logic [W-1:0] neg_half;  // written on falling edges

  always_ff @(posedge clk or posedge rst) begin
    if (rst) pos_half <= RST_VAL;
    else     pos_half <= d ^ neg_half;
  end

  always_ff @(negedge clk or posedge rst) begin
    if (rst) neg_half <= '0;
    else     neg_half <= d ^ pos_half;
  end

  assign q = pos_half ^ neg_half;

endmodule
