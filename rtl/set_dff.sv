// set_dff: single-edge-triggered (SET) D flip-flop register with asynchronous reset.
//
// This is the storage element of the SET pipes: a W-bit register that takes d on every rising
// edge of clk and is forced to RST_VAL while rst is high. With W = 1 it is one of the two
// separate memory elements of a SET pipe; with W = 2 it is the combined sum/carry memory.
//
// Interface: clk, rst (active high, asynchronous), d, q.
// Timing:    q follows d one rising edge later.
// The asynchronous active-high reset follows the reference design, whose storage elements have
// a clock and an asynchronous reset as their only controls. The width parameter is this design's own.
module set_dff #(
  parameter int unsigned    W       = 1,
  parameter logic [W-1:0]   RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= RST_VAL;
    else     q <= d;
  end

endmodule
