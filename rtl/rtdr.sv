// rtdr: reconfiguration test data register shared by all analog EIs.
//
// The RTDR holds the bits that change while monitoring runs: the EI select field SEL, which
// goes to the EI multiplexer, and the resolution field RES, which goes to the SAR logic.
// Rewriting it switches the monitored instrument and its resolution in one scan access.
// Every update also toggles upd_toggle; the SAR clock domain detects that toggle and puts
// the SAR logic into its reset phase before converting with the new setting.
//
// Register layout, bit 0 nearest scan_out: {RES, SEL}. RES holds the resolution minus one
// (0 -> 1 bit ... 7 -> 8 bits), so every code is legal. Reset value: SEL = 0 (first EI),
// RES = full DAC resolution.
//
// Interface: the IEEE 1687 segment ports of ijtag_tdr, plus sel, res and upd_toggle, all in
// the TCK domain (update-stage outputs change on the falling TCK edge of Update-DR).
// Which fields the register holds and where they go follows the reference design; the field
// order, the minus-one resolution code and the toggle hand-off are choices of this design.
module rtdr
  import split_sar_pkg::*;
#(
  parameter int unsigned        SEL_W     = 1,
  parameter int unsigned        RES_W     = 3,
  parameter logic [SEL_W-1:0]   SEL_RESET = '0,
  parameter logic [RES_W-1:0]   RES_RESET = '1
) (
  input  logic             tck,
  input  ijtag_ctrl_t      ctrl,
  input  logic             scan_in,
  output logic             scan_out,
  output logic [SEL_W-1:0] sel,
  output logic [RES_W-1:0] res,
  output logic             upd_toggle
);

  localparam int unsigned W = SEL_W + RES_W;

  logic [W-1:0] fields;
  logic         upd_rst;

  assign upd_rst = ctrl.reset;

  ijtag_tdr #(
    .WIDTH      (W),
    .RESET_VALUE({RES_RESET, SEL_RESET})
  ) u_tdr (
    .tck     (tck),
    .ctrl    (ctrl),
    .scan_in (scan_in),
    .scan_out(scan_out),
    .data_out(fields)
  );

  assign sel = fields[SEL_W-1:0];
  assign res = fields[W-1:SEL_W];

  // Same edge and condition as the update stage inside u_tdr.
  always_ff @(negedge tck or posedge upd_rst) begin
    if (upd_rst) begin
      upd_toggle <= 1'b0;
    end else if (ctrl.select && ctrl.update) begin
      upd_toggle <= ~upd_toggle;
    end
  end

endmodule
