// ijtag_tdr_tb: self-checking testbench of the IEEE 1687 configuration TDR.
//
// Drives TCK and the segment controls directly. For random values it checks: shifting in
// WIDTH bits LSB first and updating loads the value; the update outputs do not change while
// shifting or while the segment is not selected; a capture followed by WIDTH shifts reads
// the current value back on scan_out, LSB first; the scan path delays scan_in by WIDTH TCKs;
// and ctrl.reset restores the reset value.
module ijtag_tdr_tb;
  import split_sar_pkg::*;

  localparam int unsigned    W = 8;
  localparam logic [W-1:0]   RV = 8'hA5;

  logic         tck = 1'b0;
  ijtag_ctrl_t  ctrl = '0;
  logic         scan_in = 1'b0;
  logic         scan_out;
  logic [W-1:0] data_out;

  int checks = 0;
  int failures = 0;

  ijtag_tdr #(.WIDTH(W), .RESET_VALUE(RV)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic pulse();
    #5 tck = 1'b1;
    #5 tck = 1'b0;
  endtask

  // Shift W bits in (LSB first) while collecting what comes out.
  task automatic shift(input logic [W-1:0] vin, output logic [W-1:0] vout);
    ctrl.shift = 1'b1;
    for (int i = 0; i < W; i++) begin
      scan_in = vin[i];
      #1 vout[i] = scan_out;
      pulse();
    end
    ctrl.shift = 1'b0;
  endtask

  task automatic update();
    ctrl.update = 1'b1;
    pulse();
    ctrl.update = 1'b0;
  endtask

  task automatic capture();
    ctrl.capture = 1'b1;
    pulse();
    ctrl.capture = 1'b0;
  endtask

  initial begin
    logic [W-1:0] v, prev, got;
    ctrl.reset = 1'b1;
    #3 ctrl.reset = 1'b0;
    check(data_out == RV, "reset value");
    ctrl.select = 1'b1;
    prev = RV;
    for (int k = 0; k < 50; k++) begin
      v = W'($urandom);
      capture();
      shift(v, got);
      check(got == prev, $sformatf("read back %h expected %h", got, prev));
      check(data_out == prev, "outputs stable during shift");
      update();
      check(data_out == v, $sformatf("update %h expected %h", data_out, v));
      // not selected: nothing changes
      ctrl.select = 1'b0;
      shift(~v, got);
      update();
      check(data_out == v, "unselected segment ignores shift and update");
      ctrl.select = 1'b1;
      prev = v;
    end
    ctrl.reset = 1'b1;
    #3 ctrl.reset = 1'b0;
    check(data_out == RV, "reset restores reset value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
