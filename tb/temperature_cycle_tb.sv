// temperature_cycle_tb: the temperature-monitoring run of the split-SAR interface.
//
// The temperature EI (EI 1) is selected at 5 bits with a 50 kHz conversion clock, so one
// conversion takes 5 + 2 = 7 clocks and the sampling rate is 50 kHz / 7 = 7.14 kHz. Its
// front-end output follows three temperature cycles between 25 C and 125 C at 100 Hz
// (30 ms). The front-end transfer function is not part of this design; the testbench
// assumes a linear one, V = VREF * T / 160 C (0.125 V at 25 C, 0.625 V at 125 C).
//
// Checks: every conversion against the voltage held at its sample (largest 5-bit code
// below it), the 140 us conversion period, the number of conversions in 30 ms (214 or 215),
// and that the temperature read from DOUT is never more than one 5-bit step (5 C) plus the
// change during one sampling interval behind the true one (the result of a sample is
// available one sampling interval later). The EI 0 input is held at 0.4 V throughout.
module temperature_cycle_tb;
  import split_sar_pkg::*;

  localparam real CLK_HALF = 10000.0;  // ns: 50 kHz clock
  localparam real T_DEG_PER_V = 160.0 / VREF_V;
  localparam int unsigned R = 5;

  logic        tck = 1'b0;
  ijtag_ctrl_t ijtag = '0;
  logic        scan_in = 1'b0;
  logic        scan_out;
  logic [7:0]  ei_cfg [2];
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  real         vref = VREF_V;
  real         v_afe [2];
  real         v_dac;
  logic        com_serial, eoc, sample, sar_en;
  logic [7:0]  dout, dac_code;
  logic [0:0]  sel;
  logic [2:0]  res;

  split_sar_top dut (.*);

  int checks = 0;
  int failures = 0;

  always #(CLK_HALF) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  function automatic real temperature(real t_ns);
    return 75.0 - 50.0 * $cos(2.0 * 3.14159265358979 * 100.0 * t_ns * 1e-9);
  endfunction

  real t0;
  bit  running = 0;
  always @(negedge clk) begin
    v_afe[0] = 0.4;
    v_afe[1] = running ? temperature($realtime - t0) / T_DEG_PER_V : 25.0 / T_DEG_PER_V;
  end

  real v_held, t_held;
  always @(negedge sample) begin
    v_held = v_afe[sel];
    t_held = $realtime;
  end

  int  n_conv = 0;
  real last_eoc = -1.0;
  real max_lag = 0.0;

  always @(posedge eoc) if (running && sel == 1'b1) begin
    int unsigned e;
    real t_read, t_true;
    #1;
    e = 0;
    for (int c = (1 << R) - 1; c > 0; c--) begin
      if (c * VREF_V / (2.0 ** R) < v_held) begin
        e = c;
        break;
      end
    end
    check(32'(dout) == e, $sformatf("dout %0d expected %0d", dout, e));
    if (last_eoc >= 0.0) begin
      check($realtime - last_eoc > 139999.0 && $realtime - last_eoc < 140001.0,
            $sformatf("conversion period %f ns, expected 140 us", $realtime - last_eoc));
    end
    last_eoc = $realtime;
    t_read = dout * VREF_V / (2.0 ** R) * T_DEG_PER_V;
    t_true = temperature($realtime - t0);
    if (t_true - t_read > max_lag) max_lag = t_true - t_read;
    if (t_read - t_true > max_lag) max_lag = t_read - t_true;
    n_conv++;
  end

  task automatic tck_pulse();
    #500 tck = 1'b1;
    #500 tck = 1'b0;
  endtask

  initial begin
    logic [19:0] v;
    v_afe[0] = 0.4;
    v_afe[1] = 25.0 / T_DEG_PER_V;
    ijtag.reset = 1'b1;
    #(3 * CLK_HALF);
    ijtag.reset = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    // {EI 0 cfg, EI 1 cfg, RES = 5 bits, SEL = EI 1}
    v = {8'h00, 8'h00, 3'(R - 1), 1'b1};
    ijtag.select = 1'b1;
    ijtag.shift = 1'b1;
    for (int i = 0; i < 20; i++) begin
      scan_in = v[i];
      tck_pulse();
    end
    ijtag.shift = 1'b0;
    ijtag.update = 1'b1;
    tck_pulse();
    ijtag.update = 1'b0;
    ijtag.select = 1'b0;
    @(posedge eoc iff (sel == 1'b1));
    @(posedge sample);
    t0 = $realtime;
    running = 1;
    #(30_000_000.0);
    running = 0;
    check(n_conv == 214 || n_conv == 215, $sformatf("%0d conversions in 30 ms", n_conv));
    // one 5-bit step (5 C) plus the change within one 140 us interval (< 4.4 C)
    check(max_lag < 9.4, $sformatf("largest deviation %f C", max_lag));
    $display("conversions=%0d largest deviation=%f C", n_conv, max_lag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(40_000_000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
