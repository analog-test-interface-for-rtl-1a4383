// split_sar_pkg: types and constants shared by the split-SAR analog test interface.
//
// DAC_BITS is the resolution N of the shared capacitor DAC (8 bits), NUM_EI the number
// of analog embedded instruments on the interface (two: a transient-current monitor and a
// temperature monitor) and VREF_V the DAC reference / full-scale voltage (0.8 V); these
// three numbers are those of the reference design. The state encoding of the SAR controller
// and the grouping of the IEEE 1687 segment control signals into one struct are choices of
// this implementation.
package split_sar_pkg;

  localparam int unsigned DAC_BITS = 8;
  localparam int unsigned NUM_EI   = 2;
  localparam real         VREF_V   = 0.8;

  // States of the re-configurable SAR controller.
  typedef enum logic [1:0] {
    SAR_RESET    = 2'd0,  // held by SAR_EN low (after reset or an RTDR update)
    SAR_SAMPLE   = 2'd1,  // S/H of the selected EI tracks its input, one clock
    SAR_BITCYCLE = 2'd2,  // one comparator decision per clock, N_EI clocks
    SAR_EOC      = 2'd3   // end of conversion: DOUT valid, one clock
  } sar_state_e;

  // Control signals that the IEEE 1687 network distributes to every test data register
  // segment (the ResetEn / SelectEn / CaptureEn / ShiftEn / UpdateEn of a segment).
  typedef struct packed {
    logic reset;    // asynchronous reset of the update stage, active high
    logic select;   // segment is on the active scan path
    logic capture;  // Capture-DR: load the shift stage
    logic shift;    // Shift-DR: shift one bit toward scan_out
    logic update;   // Update-DR: copy the shift stage to the update stage
  } ijtag_ctrl_t;

endpackage
