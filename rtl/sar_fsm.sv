// sar_fsm: the four-state controller of the digital SAR logic.
//
// Function
//   Sequences one analog-to-digital conversion. From IDLE a high `start`
//   moves to SAMPLE; SAMPLE always lasts one clock and moves to CONVERT;
//   CONVERT stays while the bit counter is above zero and moves to DONE in
//   the clock that resolves bit 0 (`bit_zero` high); DONE lasts one clock
//   and returns to IDLE. These transitions are the design's state table.
//
// Outputs (Moore, decoded from the state register)
//   sample : high in SAMPLE only; closes the sampling switch.
//   hold   : high in every other state, so the sampled value stays stable
//            in IDLE (as the description asks) and during CONVERT and DONE.
//   eoc    : end of conversion, high for the single DONE clock.
//   state  : the current state, brought out for observation.
//
// Timing
//   All state changes happen on the rising edge of `clk`. `rst` is an
//   asynchronous, active-high reset into IDLE; its polarity and the fact
//   that it is asynchronous are this design's choice. `start` is sampled on
//   the clock edge and only matters in IDLE; it is a level, so holding it
//   high starts a new conversion right after each DONE.
module sar_fsm
  import sar_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       bit_zero,
  output sar_state_e state,
  output logic       sample,
  output logic       hold,
  output logic       eoc
);

  sar_state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_IDLE:    if (start)    state_d = ST_SAMPLE;
      ST_SAMPLE:                state_d = ST_CONVERT;
      ST_CONVERT: if (bit_zero) state_d = ST_DONE;
      ST_DONE:                  state_d = ST_IDLE;
      default:                  state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state_q <= ST_IDLE;
    else     state_q <= state_d;
  end

  assign state  = state_q;
  assign sample = (state_q == ST_SAMPLE);
  assign hold   = !sample;
  assign eoc    = (state_q == ST_DONE);

  // SAMPLE and DONE each last exactly one clock.
  a_sample_one_cycle: assert property (@(posedge clk) disable iff (rst)
    state_q == ST_SAMPLE |=> state_q == ST_CONVERT);
  a_done_one_cycle: assert property (@(posedge clk) disable iff (rst)
    state_q == ST_DONE |=> state_q == ST_IDLE);

endmodule
