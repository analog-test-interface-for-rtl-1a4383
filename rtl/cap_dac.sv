// cap_dac: behavioural model of the shared binary-weighted switched-capacitor DAC.
//
// This is a model of an analog block, not synthesizable logic. An N-bit binary-weighted
// capacitor array with reference vref ideally produces vout = vref * code / 2**N; the model
// gives that value at once, with no settling time, mismatch or charge injection. It is the
// one DAC shared by all analog EIs, sized for the largest resolution (8 bits, 0.8 V
// reference in the reference design).
//
// Interface: code (from the SAR logic), vref and vout as real voltages.
module cap_dac
  import split_sar_pkg::*;
#(
  parameter int unsigned N = DAC_BITS
) (
  input  logic [N-1:0] code,
  input  real          vref,
  output real          vout
);

  assign vout = vref * real'(code) / real'(2.0 ** N);

endmodule
