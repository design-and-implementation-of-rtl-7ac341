// sar_logic: 10-bit FSM-based digital SAR logic (top level).
//
// Function
//   The digital control unit of a successive approximation ADC. It sits
//   between a sample-and-hold, a DAC and a comparator, which are outside
//   this block. A conversion is requested with `start`; the controller
//   closes the sampling switch for one clock, then runs a binary search
//   from the MSB to the LSB, one bit per clock, driving the trial code on
//   `code` to the DAC and reading the comparator on `comp`. When the LSB is
//   resolved it raises `eoc` for one clock; `code` then holds the result
//   and keeps it until the next conversion starts.
//
// Structure
//   sar_fsm      : IDLE -> SAMPLE -> CONVERT (N clocks) -> DONE -> IDLE.
//   sar_register : the SAR register and its bit counter.
//   `state` and `bit_count` (index of the bit under trial) are brought out
//   for observation only.
//   The register loads the MSB trial in the SAMPLE clock and steps in each
//   CONVERT clock; the counter reaching zero ends CONVERT.
//
// Timing (N = 10)
//   Edge 0 samples start=1 in IDLE; SAMPLE is the next clock, CONVERT the
//   N clocks after it and DONE the one after that, so eoc is high in the
//   (N+2)-th clock after the start edge and a new conversion can start
//   every N+3 clocks when start is held high.
//
//   The states, the state table, the bit counter and the one-bit-per-clock
//   search follow the design description; the port names, the reset
//   (asynchronous, active high) and the exact clock in which each register
//   update happens are this design's choices.
module sar_logic
  import sar_pkg::*;
#(
  parameter int unsigned N = SAR_BITS
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         comp,
  output logic         sample,
  output logic         hold,
  output logic [N-1:0] code,
  output logic         eoc,
  output sar_state_e   state,
  output logic [(N > 1 ? $clog2(N) : 1)-1:0] bit_count
);

  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  logic bit_zero;

  sar_fsm u_fsm (
    .clk      (clk),
    .rst      (rst),
    .start    (start),
    .bit_zero (bit_zero),
    .state    (state),
    .sample   (sample),
    .hold     (hold),
    .eoc      (eoc)
  );

  sar_register #(.N(N), .CW(CW)) u_reg (
    .clk       (clk),
    .rst       (rst),
    .load      (state == ST_SAMPLE),
    .step      (state == ST_CONVERT),
    .comp      (comp),
    .code      (code),
    .bit_count (bit_count),
    .bit_zero  (bit_zero)
  );

endmodule
