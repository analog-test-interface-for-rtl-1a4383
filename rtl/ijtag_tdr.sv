// ijtag_tdr: IEEE 1687 test data register of one analog embedded instrument.
//
// Each analog EI owns such a register for its configuration and calibration bits; they are
// written once before monitoring starts and drive the EI's analog front-end. The register
// has the usual two stages. The shift stage captures the present update-stage contents
// (so the configuration can be read back) on Capture-DR and shifts one bit per TCK on
// Shift-DR, entering at the MSB and leaving at bit 0 toward scan_out. The update stage
// takes the shift stage on the falling TCK edge of Update-DR, so its outputs never ripple
// during shifting, and returns to RESET_VALUE on ctrl.reset.
//
// Interface: tck, ctrl (split_sar_pkg::ijtag_ctrl_t), scan_in / scan_out, data_out.
// Timing: capture and shift on rising TCK while ctrl.select is high; update on falling TCK.
// That the register exists, per EI, and is daisy-chained with the others follows the
// reference design; its width, bit order, read-back capture and reset value are choices of
// this implementation.
module ijtag_tdr
  import split_sar_pkg::*;
#(
  parameter int unsigned      WIDTH       = 8,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             tck,
  input  ijtag_ctrl_t      ctrl,
  input  logic             scan_in,
  output logic             scan_out,
  output logic [WIDTH-1:0] data_out
);

  logic [WIDTH-1:0] shift_q;
  logic             upd_rst;

  assign upd_rst = ctrl.reset;

  always_ff @(posedge tck) begin
    if (ctrl.select && ctrl.capture) begin
      shift_q <= data_out;
    end else if (ctrl.select && ctrl.shift) begin
      shift_q <= {scan_in, shift_q[WIDTH-1:1]};
    end
  end

  always_ff @(negedge tck or posedge upd_rst) begin
    if (upd_rst) begin
      data_out <= RESET_VALUE;
    end else if (ctrl.select && ctrl.update) begin
      data_out <= shift_q;
    end
  end

  assign scan_out = shift_q[0];

endmodule
