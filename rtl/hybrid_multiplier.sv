// hybrid_multiplier: 32-bit hybrid (serial/parallel) multiplier built around a single
// micro-pipeline.
//
// Three parts in a row: the PTSC turns the parallel operands into a serial multiplier stream
// (LSB first) and a held multiplicand. The micro-pipeline (one pipe per multiplicand bit:
// full adder plus stored sum and carry) adds and shifts in the same stage and emits one product
// bit per step. The STPC gathers the 2N product bits back into a parallel word. A one-hot
// sequencer drives the load and shift controls.
//
// MEM selects the storage of the pipes, and with it the clocking of the whole multiplier. The
// default is MEM_DET_COMB: sum and carry merged into one memory per pipe, clocked on both edges.
// In the double-edge styles the converters and the sequencer step on both edges too, so one
// multiplication takes N+1 clock periods instead of the 2N+2 of the single-edge styles.
//
// The three-part structure, the 32-bit width and the DET combined-memory default follow the
// reference design; the parallel ports, the handshake and the sequencer are this design's own.
//
// Interface: start (sampled on a step while not busy), a (multiplier), b (multiplicand);
//            busy, done (high from completion until the next start), p = a * b (unsigned, 2N bits,
//            valid while done is high).
// Timing:    done rises 2N+2 steps after the step that sampled start. A step is a rising edge
//            (SET styles) or any clock edge (DET styles). In the DET styles the inputs must be
//            stable around both clock edges.
module hybrid_multiplier
  import hm_pkg::*;
#(
  parameter int unsigned N   = HM_WIDTH,
  parameter mem_style_e  MEM = MEM_DET_COMB
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] p
);

  localparam bit DET = mem_is_det(MEM);

  logic         load, shift_en, a_ser, p_ser;
  logic [N-1:0] b_hold;

  hm_ctrl #(.N(N), .DET(DET)) u_ctrl (
    .clk(clk), .rst(rst), .start(start),
    .load(load), .shift_en(shift_en), .busy(busy), .done(done)
  );

  ptsc #(.N(N), .DET(DET)) u_ptsc (
    .clk(clk), .rst(rst), .load(load), .a(a), .b(b), .a_ser(a_ser), .b_hold(b_hold)
  );

  micro_pipeline #(.N(N), .MEM(MEM)) u_pipeline (
    .clk(clk), .rst(rst), .a_ser(a_ser), .b(b_hold), .p_ser(p_ser)
  );

  stpc #(.W(2 * N), .DET(DET)) u_stpc (
    .clk(clk), .rst(rst), .shift_en(shift_en), .ser_in(p_ser), .par_out(p)
  );

endmodule
