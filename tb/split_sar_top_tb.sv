// split_sar_top_tb: end-to-end testbench of the split-SAR analog test interface.
//
// Runs the whole interface at its default sizes (two EIs, 8-bit DAC, 0.8 V reference) with
// a 50 kHz conversion clock and a 1 MHz TCK, replaying the two-instrument scenario of the
// design: EI 0 (a transient-current monitor) converted at 8 bits, then one RTDR update that
// selects EI 1 (a temperature monitor) at 5 bits, then random reconfigurations. The EI 0
// front-end voltage changes on every clock, so each result must come from the value held at
// the falling edge of `sample`.
//
// A monitor checks every conversion independently of the RTL: the expected code is the
// largest c < 2**R with c * VREF / 2**R below the held voltage; DOUT, the bits seen on the
// serial wire com_serial during bit cycling, the bit count R, the conversion period R + 2
// clocks, the zero bits in the sample and EOC clocks and the DAC voltage at EOC are checked.
// Each RTDR update must hold SAR_EN low for exactly 2 clocks. Scan accesses write the EI
// configuration registers and read back the previous contents through the daisy chain.
// Counted mechanisms (each must occur): conversions on each EI, 8-bit and 5-bit
// conversions, SAR_EN reset phases after updates, EI switches, configuration read-backs.
module split_sar_top_tb;
  import split_sar_pkg::*;

  localparam int unsigned NUM = NUM_EI;
  localparam int unsigned N = DAC_BITS;
  localparam int unsigned CFG_W = 8;
  localparam int unsigned SEL_W = 1;
  localparam int unsigned RES_W = 3;
  localparam int unsigned L = NUM * CFG_W + SEL_W + RES_W;
  localparam real CLK_HALF = 10000.0;  // 50 kHz
  localparam real TCK_HALF = 500.0;    // 1 MHz

  logic             tck = 1'b0;
  ijtag_ctrl_t      ijtag = '0;
  logic             scan_in = 1'b0;
  logic             scan_out;
  logic [CFG_W-1:0] ei_cfg [NUM];
  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  real              vref = VREF_V;
  real              v_afe [NUM];
  real              v_dac;
  logic             com_serial, eoc, sample, sar_en;
  logic [N-1:0]     dout, dac_code;
  logic [SEL_W-1:0] sel;
  logic [RES_W-1:0] res;

  split_sar_top dut (.*);

  int checks = 0;
  int failures = 0;
  int n_conv [NUM];
  int n_conv8 = 0, n_conv5 = 0, n_resets = 0, n_switch = 0, n_readback = 0;

  always #(CLK_HALF) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  function automatic int unsigned expected_code(real v, int unsigned r);
    for (int c = (1 << r) - 1; c > 0; c--) begin
      if (c * VREF_V / (2.0 ** r) < v) return c;
    end
    return 0;
  endfunction

  // ---------------- front-end voltages ----------------
  // EI 0 changes on every clock; EI 1 drifts slowly.
  real temp_v = 0.31;
  always @(negedge clk) begin
    v_afe[0] = $urandom_range(0, 7999) / 10000.0;
    temp_v = temp_v + ($urandom_range(0, 20) - 10) / 10000.0;
    if (temp_v < 0.05) temp_v = 0.05;
    if (temp_v > 0.75) temp_v = 0.75;
    v_afe[1] = temp_v;
  end

  // ---------------- conversion monitor ----------------
  real          v_held;
  logic [SEL_W-1:0] held_sel;
  always @(negedge sample) begin
    v_held = v_afe[sel];
    held_sel = sel;
  end

  bit           in_conv = 0, period_valid = 0;
  int unsigned  nb, r_conv, cyc, last_r, low_cnt = 0;
  logic [N-1:0] bits;
  logic [SEL_W-1:0] last_sel = '0;
  bit           seen_first = 0;

  // SAR_EN is registered, so the SAR logic sits in its reset phase one clock later than
  // SAR_EN is low: that is when the strobes and the serial wire must be idle.
  bit prev_low = 0;
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (prev_low) begin
      check(!com_serial && !sample && !eoc, "idle outputs in the reset phase");
    end
    prev_low = !sar_en;
    if (!sar_en) begin
      low_cnt++;
      in_conv = 0;
      period_valid = 0;
    end else begin
      if (low_cnt != 0) begin
        check(low_cnt == 2, $sformatf("SAR_EN low for %0d clocks, expected 2", low_cnt));
        if (seen_first) n_resets++;
        seen_first = 1;
        low_cnt = 0;
      end
      if (sample) begin
        check(!com_serial, "serial bit 0 in the sample clock");
        if (period_valid) begin
          check(cyc == last_r + 2, $sformatf("conversion period %0d, expected %0d", cyc, last_r + 2));
        end
        cyc = 0;
        in_conv = 1;
        nb = 0;
        bits = '0;
        r_conv = 32'(res) + 1;
        if (sel != last_sel) n_switch++;
        last_sel = sel;
      end else if (eoc) begin
        check(!com_serial, "serial bit 0 in the EOC clock");
        if (in_conv) begin
          int unsigned e;
          real lsb;
          e = expected_code(v_held, r_conv);
          lsb = VREF_V / (2.0 ** r_conv);
          check(nb == r_conv, $sformatf("%0d bit cycles, expected %0d", nb, r_conv));
          check(32'(dout) == e, $sformatf("EI %0d R=%0d v=%f: dout %0d expected %0d",
                                          held_sel, r_conv, v_held, dout, e));
          check(32'(bits) == e, "serial stream equals DOUT");
          check(v_dac <= v_held && v_held - v_dac <= lsb + 1e-9, "DAC converged to the held input");
          n_conv[held_sel]++;
          if (r_conv == 8) n_conv8++;
          if (r_conv == 5) n_conv5++;
          last_r = r_conv;
          period_valid = 1;
        end
        in_conv = 0;
      end else if (in_conv) begin
        bits = {bits[N-2:0], com_serial};
        nb++;
      end
    end
  end

  // ---------------- IEEE 1687 scan access ----------------
  task automatic tck_pulse();
    #(TCK_HALF) tck = 1'b1;
    #(TCK_HALF) tck = 1'b0;
  endtask

  logic [L-1:0] chain_state;

  task automatic scan(input logic [CFG_W-1:0] c0, input logic [CFG_W-1:0] c1,
                      input int unsigned sel_v, input int unsigned r_bits);
    logic [L-1:0] vin, vout;
    vin = {c0, c1, RES_W'(r_bits - 1), SEL_W'(sel_v)};
    ijtag.select = 1'b1;
    ijtag.capture = 1'b1;
    tck_pulse();
    ijtag.capture = 1'b0;
    ijtag.shift = 1'b1;
    for (int i = 0; i < L; i++) begin
      scan_in = vin[i];
      #1 vout[i] = scan_out;
      tck_pulse();
    end
    ijtag.shift = 1'b0;
    ijtag.update = 1'b1;
    tck_pulse();
    ijtag.update = 1'b0;
    ijtag.select = 1'b0;
    check(vout == chain_state, $sformatf("read back %h expected %h", vout, chain_state));
    n_readback++;
    check(ei_cfg[0] == c0 && ei_cfg[1] == c1, "EI configuration registers written");
    chain_state = vin;
  endtask

  task automatic wait_conversions(input int unsigned k);
    repeat (k) @(posedge eoc);
  endtask

  initial begin
    int unsigned s, r;
    logic [CFG_W-1:0] c0, c1;
    v_afe[0] = 0.0;
    v_afe[1] = temp_v;
    ijtag.reset = 1'b1;
    #(3 * CLK_HALF);
    ijtag.reset = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    chain_state = {{(NUM * CFG_W){1'b0}}, {RES_W{1'b1}}, {SEL_W{1'b0}}};
    // EI 0, 8 bits (the reset setting), then program the configuration explicitly.
    wait_conversions(5);
    check(sel == '0 && res == '1, "after reset: EI 0 at full resolution");
    c0 = 8'h3C;
    c1 = 8'hC3;
    scan(c0, c1, 0, 8);
    wait_conversions(20);
    // Switch to the temperature EI at 5 bits.
    scan(c0, c1, 1, 5);
    wait_conversions(20);
    // Random reconfigurations.
    for (int k = 0; k < 30; k++) begin
      s = $urandom_range(0, NUM - 1);
      r = (k % 3 == 0) ? 8 : $urandom_range(1, N);
      c0 = CFG_W'($urandom);
      c1 = CFG_W'($urandom);
      scan(c0, c1, s, r);
      wait_conversions($urandom_range(1, 6));
    end
    @(negedge clk);
    check(n_conv[0] > 0, "conversions on EI 0");
    check(n_conv[1] > 0, "conversions on EI 1");
    check(n_conv8 > 0, "8-bit conversions");
    check(n_conv5 > 0, "5-bit conversions");
    check(n_resets > 0, "SAR_EN reset phases after RTDR updates");
    check(n_switch > 0, "EI switches");
    check(n_readback > 0, "configuration read-backs");
    $display("mechanisms: conv EI0=%0d EI1=%0d 8-bit=%0d 5-bit=%0d resets=%0d switches=%0d readbacks=%0d",
             n_conv[0], n_conv[1], n_conv8, n_conv5, n_resets, n_switch, n_readback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2000 * 2 * CLK_HALF);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
