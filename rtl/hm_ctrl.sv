// hm_ctrl: sequencer of the hybrid multiplier.
//
// A four-state machine with one-hot state encoding (one flip-flop per state, so a state change
// toggles exactly two state bits):
//   IDLE : waiting. start -> load the operands into the PTSC, go to RUN.
//   RUN  : 2N steps. The pipeline consumes N operand bits and N flush zeros. From the second
//          RUN step on, the STPC takes the product bit the pipeline produced one step earlier.
//   CAP  : one step in which the STPC takes the last product bit.
//   DONE : the product is complete and held; done is high. start loads a new operation at once.
// The state register and step counter advance once per pipeline step: on rising edges
// (DET = 0) or on both edges (DET = 1).
//
// The one-hot encoding follows the low-power argument of the reference design; the states, the
// handshake and the step counts are this design's own.
//
// Interface: start in; load, shift_en, busy, done out. load is combinational (start while idle
//            or done) so the operands are taken on the same step that samples start.
// Timing:    done rises 2N+2 steps after the step that sampled start.
module hm_ctrl #(
  parameter int unsigned N   = 32,
  parameter bit          DET = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  output logic load,
  output logic shift_en,
  output logic busy,
  output logic done
);

  localparam int unsigned CW = $clog2(2 * N + 1);

  typedef enum logic [3:0] {
    ST_IDLE = 4'b0001,
    ST_RUN  = 4'b0010,
    ST_CAP  = 4'b0100,
    ST_DONE = 4'b1000
  } state_e;

  state_e        state_q, state_d;
  logic [CW-1:0] cnt_q, cnt_d;
  logic [3:0]    state_bits;

  step_reg #(.W(4), .DET(DET), .RST_VAL(4'(ST_IDLE))) u_state (
    .clk(clk), .rst(rst), .d(4'(state_d)), .q(state_bits)
  );
  step_reg #(.W(CW), .DET(DET)) u_cnt (.clk(clk), .rst(rst), .d(cnt_d), .q(cnt_q));

  assign state_q = state_e'(state_bits);

  always_comb begin
    state_d  = state_q;
    cnt_d    = cnt_q;
    load     = 1'b0;
    shift_en = 1'b0;
    unique case (state_q)
      ST_IDLE, ST_DONE: begin
        if (start) begin
          load    = 1'b1;
          cnt_d   = '0;
          state_d = ST_RUN;
        end
      end
      ST_RUN: begin
        shift_en = (cnt_q != '0);
        cnt_d    = cnt_q + 1'b1;
        if (cnt_q == CW'(2 * N - 1)) state_d = ST_CAP;
      end
      ST_CAP: begin
        shift_en = 1'b1;
        state_d  = ST_DONE;
      end
      default: begin
        state_d = ST_IDLE;
      end
    endcase
  end

  assign busy = (state_q == ST_RUN) || (state_q == ST_CAP);
  assign done = (state_q == ST_DONE);

  // The state register must always be one-hot (checked on every rising edge out of reset).
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(state_bits))
    else $error("hm_ctrl: state register not one-hot: %b", state_bits);

endmodule
