// sample_hold: behavioural model of an EI's sample-and-hold circuit.
//
// This is a model of an analog block, not synthesizable logic. While `sample` is high the
// output follows the input (acquisition); at the falling edge of `sample` the input is
// stored on the sampling capacitor and the output holds that value until the next sample.
// kT/C noise, droop and finite acquisition bandwidth are not modelled. Before the first
// sample the held value is 0 V.
//
// Interface: vin (AFE output, real volts), sample, vout (real volts).
module sample_hold (
  input  real  vin,
  input  logic sample,
  output real  vout
);

  real held;

  initial held = 0.0;

  always @(negedge sample) held <= vin;

  assign vout = sample ? vin : held;

endmodule
