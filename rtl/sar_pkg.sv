// sar_pkg: types and constants shared by the SAR logic modules.
//
// The SAR controller is a four-state machine. The states are IDLE (waiting
// for start), SAMPLE (the sample-and-hold tracks the input), CONVERT (one
// bit resolved per clock, MSB first) and DONE (end of conversion flagged).
// The four state names and their meaning follow the design description;
// the two-bit binary encoding below is this implementation's own choice.
package sar_pkg;

  // Default resolution of the converter in bits.
  localparam int unsigned SAR_BITS = 10;

  typedef enum logic [1:0] {
    ST_IDLE    = 2'd0,
    ST_SAMPLE  = 2'd1,
    ST_CONVERT = 2'd2,
    ST_DONE    = 2'd3
  } sar_state_e;

endpackage
