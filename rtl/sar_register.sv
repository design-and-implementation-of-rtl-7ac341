// sar_register: successive approximation register and bit counter.
//
// Function
//   Holds the N-bit trial code that drives the DAC and, at the end, the
//   conversion result. It performs the binary search from MSB to LSB:
//     load (last SAMPLE clock): code <= 100...0 (MSB set as the first
//                               trial), bit counter <= N-1.
//     step (each CONVERT clock): the bit under trial, code[bit_counter],
//                               takes the comparator decision `comp`
//                               (1 keeps it, 0 clears it); if the counter is
//                               above zero the next lower bit is set to 1
//                               as the next trial and the counter
//                               decrements.
//   With neither strobe the register keeps its value, so the result stays
//   readable in DONE and IDLE until the next conversion loads a new trial.
//
// Interface
//   comp       : comparator output, 1 when the held input is above the DAC
//                voltage for the current trial code.
//   code       : the SAR register, to the DAC and the data output.
//   bit_count  : the bit counter, the index of the bit under trial.
//   bit_zero   : bit_count == 0, tells the controller that the step in
//                progress resolves the LSB.
//
// Timing
//   One bit per clock: N step clocks resolve N bits. The comparator is
//   assumed to have settled on the current code by the next rising edge.
//   The MSB-first binary search, one-bit-per-clock updates and the bit
//   counter follow the design description; setting the next trial bit in
//   the same clock as the decision, the counter width and the asynchronous
//   active-high reset to all zeros are this design's choices.
module sar_register #(
  parameter int unsigned N  = 10,
  parameter int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic          step,
  input  logic          comp,
  output logic [N-1:0]  code,
  output logic [CW-1:0] bit_count,
  output logic          bit_zero
);

  logic [N-1:0]  code_q;
  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      code_q <= '0;
      cnt_q  <= '0;
    end else if (load) begin
      code_q <= '0;
      code_q[N-1] <= 1'b1;
      cnt_q  <= CW'(N - 1);
    end else if (step) begin
      code_q[cnt_q] <= comp;
      if (cnt_q != '0) begin
        code_q[cnt_q - 1'b1] <= 1'b1;
        cnt_q <= cnt_q - 1'b1;
      end
    end
  end

  assign code      = code_q;
  assign bit_count = cnt_q;
  assign bit_zero  = (cnt_q == '0);

  a_load_step_exclusive: assert property (@(posedge clk) disable iff (rst)
    !(load && step));

endmodule
