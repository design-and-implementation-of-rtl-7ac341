// sar_afe_model: behavioural model of the analog front end around the SAR
// logic, for simulation only (not synthesizable: it uses real numbers).
//
// It lumps together the three analog parts of a SAR ADC:
//   sample-and-hold : while `sample` is high the held voltage follows
//                     `vin`; when it falls the last value is kept.
//   DAC             : ideal binary-weighted DAC, vdac = code * VREF / 2^N,
//                     so the MSB alone gives VREF/2.
//   comparator      : `comp` = 1 when the held input is above vdac.
// The comparator output is continuous (settles at once), so it is valid
// at the next rising clock edge after every code change.
module sar_afe_model #(
  parameter int unsigned N    = 10,
  parameter real         VREF = 1.0
) (
  input  real          vin,
  input  logic         sample,
  input  logic [N-1:0] code,
  output logic         comp,
  output real          vheld
);

  real vdac;

  always_latch
    if (sample) vheld = vin;

  always_comb vdac = real'(code) * VREF / real'(2.0 ** N);
  always_comb comp = (vheld > vdac);

endmodule
