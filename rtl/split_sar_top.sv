// split_sar_top: analog test interface for IEEE 1687 built on a split SAR ADC.
//
// A SAR ADC is cut in two. Each analog embedded instrument (EI) keeps its own sample-and-
// hold and comparator (analog_ei) next to its analog front-end, so its sensitive voltage is
// never routed across the chip. The SAR logic (sar_logic) and the capacitor DAC (cap_dac),
// the largest part of a SAR ADC, exist once and are shared by all EIs; the EI multiplexer
// (ei_mux) connects the selected EI's comparator to them. The selected comparator's output
// is also the interface's serial data output com_serial: during the bit-cycling clocks it is
// the conversion result MSB first, and it is 0 in the sample and EOC clocks, giving
// N_EI + 2 bits per conversion on one extra wire, at the conversion clock rather than TCK.
//
// IEEE 1687 side: one configuration TDR per EI (ijtag_tdr, outputs ei_cfg to the front-ends)
// and the shared reconfiguration TDR (rtdr: SEL and RES) are daisy-chained
//   scan_in -> EI 0 TDR -> ... -> EI NUM-1 TDR -> RTDR -> scan_out,
// all on one segment select; the RTDR's bits are therefore the first to be shifted out and
// the last shifted in. Every update of the RTDR reaches the SAR clock domain through
// sar_en_gen, which holds SAR_EN low for two CLK cycles and loads the new SEL / RES; the
// SAR logic then restarts with a sample of the newly selected EI.
//
// Ports: tck, ijtag (split_sar_pkg::ijtag_ctrl_t), scan_in, scan_out (1687 segment); clk,
// rst_n (conversion clock and its reset); vref, v_afe[NUM] (real volts: DAC reference and
// the EI front-end outputs); ei_cfg[NUM] (configuration bits to the front-ends); com_serial,
// dout, eoc (results); sample, sar_en, dac_code, v_dac, sel, res (observation).
// EI_HAS_SH chooses per EI between a sampled input (through the S/H) and a DC node voltage
// wired straight to the comparator; both EIs of the default configuration sample.
// Timing: one conversion takes N_EI + 2 CLK cycles; DOUT is valid while eoc is high and until
// the next EOC.
// The split, the shared SAR/DAC, the per-EI TDRs, the RTDR with SEL and RES, the 2-cycle
// SAR_EN reset and the serial comparator output follow the reference design; the TDR
// widths, field encodings and the clock-domain hand-off are this implementation's choices.
module split_sar_top
  import split_sar_pkg::*;
#(
  parameter int unsigned NUM   = NUM_EI,
  parameter int unsigned N     = DAC_BITS,
  parameter int unsigned CFG_W = 8,
  parameter int unsigned SEL_W = (NUM > 1) ? $clog2(NUM) : 1,
  parameter int unsigned RES_W = $clog2(N),
  // bit i = 1: EI i samples through its S/H; 0: EI i is a DC-node monitor without S/H
  parameter logic [NUM-1:0] EI_HAS_SH = '1
) (
  // IEEE 1687 network segment
  input  logic                 tck,
  input  ijtag_ctrl_t          ijtag,
  input  logic                 scan_in,
  output logic                 scan_out,
  output logic [CFG_W-1:0]     ei_cfg [NUM],
  // conversion clock domain
  input  logic                 clk,
  input  logic                 rst_n,
  // analog quantities
  input  real                  vref,
  input  real                  v_afe [NUM],
  output real                  v_dac,
  // results and observation
  output logic                 com_serial,
  output logic [N-1:0]         dout,
  output logic                 eoc,
  output logic                 sample,
  output logic                 sar_en,
  output logic [N-1:0]         dac_code,
  output logic [SEL_W-1:0]     sel,
  output logic [RES_W-1:0]     res
);

  // ---------------- IEEE 1687 daisy chain ----------------
  logic [NUM:0]        chain;
  logic [SEL_W-1:0]    sel_tck;
  logic [RES_W-1:0]    res_tck;
  logic                upd_toggle;

  assign chain[0] = scan_in;

  for (genvar i = 0; i < NUM; i++) begin : g_ei_tdr
    ijtag_tdr #(.WIDTH(CFG_W)) u_tdr (
      .tck     (tck),
      .ctrl    (ijtag),
      .scan_in (chain[i]),
      .scan_out(chain[i+1]),
      .data_out(ei_cfg[i])
    );
  end

  rtdr #(
    .SEL_W(SEL_W),
    .RES_W(RES_W)
  ) u_rtdr (
    .tck       (tck),
    .ctrl      (ijtag),
    .scan_in   (chain[NUM]),
    .scan_out  (scan_out),
    .sel       (sel_tck),
    .res       (res_tck),
    .upd_toggle(upd_toggle)
  );

  // ---------------- conversion clock domain ----------------
  sar_en_gen #(
    .SEL_W(SEL_W),
    .RES_W(RES_W)
  ) u_sar_en (
    .clk       (clk),
    .rst_n     (rst_n),
    .upd_toggle(upd_toggle),
    .sel_in    (sel_tck),
    .res_in    (res_tck),
    .sar_en    (sar_en),
    .sel       (sel),
    .res       (res)
  );

  logic comp_en;

  sar_logic #(
    .N    (N),
    .RES_W(RES_W)
  ) u_sar (
    .clk     (clk),
    .rst_n   (rst_n),
    .sar_en  (sar_en),
    .res     (res),
    .com     (com_serial),
    .sample  (sample),
    .comp_en (comp_en),
    .eoc     (eoc),
    .dac_code(dac_code),
    .dout    (dout),
    .state   ()
  );

  cap_dac #(.N(N)) u_dac (
    .code(dac_code),
    .vref(vref),
    .vout(v_dac)
  );

  // ---------------- EI selection and the EIs ----------------
  logic [NUM-1:0] ei_com, ei_sample, ei_comp_en;

  ei_mux #(
    .NUM  (NUM),
    .SEL_W(SEL_W)
  ) u_mux (
    .sel        (sel),
    .com_in     (ei_com),
    .sample_in  (sample),
    .comp_en_in (comp_en),
    .com_out    (com_serial),
    .sample_out (ei_sample),
    .comp_en_out(ei_comp_en)
  );

  for (genvar i = 0; i < NUM; i++) begin : g_ei
    analog_ei #(.HAS_SH(EI_HAS_SH[i])) u_ei (
      .v_afe  (v_afe[i]),
      .v_dac  (v_dac),
      .sample (ei_sample[i]),
      .comp_en(ei_comp_en[i]),
      .com    (ei_com[i])
    );
  end

endmodule
