// rtdr_tb: self-checking testbench of the reconfiguration TDR.
//
// Checks the reset values (SEL = 0, RES = full resolution code), that a scan of {RES, SEL}
// followed by an update sets both fields, that each update (and only an update) flips
// upd_toggle, and that a capture reads the fields back in the same order.
module rtdr_tb;
  import split_sar_pkg::*;

  localparam int unsigned SEL_W = 2;
  localparam int unsigned RES_W = 3;
  localparam int unsigned W = SEL_W + RES_W;

  logic             tck = 1'b0;
  ijtag_ctrl_t      ctrl = '0;
  logic             scan_in = 1'b0;
  logic             scan_out;
  logic [SEL_W-1:0] sel;
  logic [RES_W-1:0] res;
  logic             upd_toggle;

  int checks = 0;
  int failures = 0;

  rtdr #(.SEL_W(SEL_W), .RES_W(RES_W)) dut (.*);

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

  task automatic scan(input logic [W-1:0] vin, output logic [W-1:0] vout);
    ctrl.capture = 1'b1;
    pulse();
    ctrl.capture = 1'b0;
    ctrl.shift = 1'b1;
    for (int i = 0; i < W; i++) begin
      scan_in = vin[i];
      #1 vout[i] = scan_out;
      pulse();
    end
    ctrl.shift = 1'b0;
  endtask

  initial begin
    logic [SEL_W-1:0] s, ps;
    logic [RES_W-1:0] r, pr;
    logic [W-1:0]     got;
    logic             t;
    ctrl.reset = 1'b1;
    #3 ctrl.reset = 1'b0;
    check(sel == '0 && res == '1 && upd_toggle == 1'b0, "reset values");
    ctrl.select = 1'b1;
    ps = '0;
    pr = '1;
    for (int k = 0; k < 40; k++) begin
      s = SEL_W'($urandom);
      r = RES_W'($urandom);
      t = upd_toggle;
      scan({r, s}, got);
      check(got == {pr, ps}, "capture reads back {RES, SEL}");
      check(upd_toggle == t && sel == ps && res == pr, "no change before update");
      ctrl.update = 1'b1;
      pulse();
      ctrl.update = 1'b0;
      check(sel == s, $sformatf("SEL %0d expected %0d", sel, s));
      check(res == r, $sformatf("RES %0d expected %0d", res, r));
      check(upd_toggle == !t, "update toggles upd_toggle");
      ps = s;
      pr = r;
    end
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
