// analog_ei: behavioural model of the EI-local half of the split SAR.
//
// This is a model of analog circuitry, not synthesizable logic. Each analog embedded
// instrument carries its own sample-and-hold and comparator next to its analog front-end,
// so the monitored voltage never leaves the instrument: only the DAC voltage comes in and
// only the single comparator bit goes out. The front-end itself is outside this model; its
// output voltage is the input v_afe.
//
// HAS_SH selects between the two kinds of instrument of the reference design: 1 for a
// periodically sampled signal, which passes through the S/H; 0 for a DC node voltage, which
// is wired straight to the comparator (the `sample` strobe is then ignored).
//
// Interface: v_afe and v_dac (real volts), sample and comp_en from the EI multiplexer, com.
// Timing: see sample_hold (hold at the falling edge of sample) and comparator (0 unless
// comp_en).
module analog_ei #(
  parameter bit  HAS_SH   = 1'b1,
  parameter real OFFSET_V = 0.0
) (
  input  real  v_afe,
  input  real  v_dac,
  input  logic sample,
  input  logic comp_en,
  output logic com
);

  real v_held;

  if (HAS_SH) begin : g_sh
    sample_hold u_sh (
      .vin   (v_afe),
      .sample(sample),
      .vout  (v_held)
    );
  end else begin : g_dc
    assign v_held = v_afe;
  end

  comparator #(.OFFSET_V(OFFSET_V)) u_cmp (
    .vin   (v_held),
    .vdac  (v_dac),
    .enable(comp_en),
    .com   (com)
  );

endmodule
