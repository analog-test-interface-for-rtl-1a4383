// comparator: behavioural model of an EI's double-tail latch comparator.
//
// This is a model of an analog block, not synthesizable logic. While `enable` is high (the
// SAR's bit-cycling clocks) the output is 1 when the held input exceeds the DAC voltage by
// more than OFFSET_V, else 0; while `enable` is low the latch is in reset and the output is
// 0, which provides the zero bits of the serial stream in the sample and EOC phases.
// Decisions are instantaneous; input noise is not modelled.
//
// Interface: vin, vdac (real volts), enable, com.
module comparator #(
  parameter real OFFSET_V = 0.0
) (
  input  real  vin,
  input  real  vdac,
  input  logic enable,
  output logic com
);

  assign com = enable && (vin > vdac + OFFSET_V);

endmodule
