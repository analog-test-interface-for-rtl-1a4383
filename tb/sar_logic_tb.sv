// sar_logic_tb: self-checking testbench of the SAR controller.
//
// The comparator is modelled here on integers: the "analog" input is a 16-bit value vin16
// and com = comp_en && vin16 > dac_code * 256. For a resolution of R bits the correct
// result is the largest code c (at most 2**R - 1) with c * 2**(16-R) < vin16, worked out
// directly with a division. For every conversion the testbench checks DOUT, the serial bits
// seen on com during the bit-cycling clocks (MSB first), the final DAC code, the number of
// bit-cycling clocks (N_EI), the conversion period (N_EI + 2 clocks) and that sample, EOC
// and comparator enable never overlap. Every tenth conversion SAR_EN is pulled low for two
// clocks with a new resolution, and the reset phase (state, DOUT cleared, no sample) and
// the restart are checked.
module sar_logic_tb;
  import split_sar_pkg::*;

  localparam int unsigned N     = 8;
  localparam int unsigned RES_W = 3;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             sar_en = 1'b0;
  logic [RES_W-1:0] res = '1;
  logic             com, sample, comp_en, eoc;
  logic [N-1:0]     dac_code, dout;
  sar_state_e       state;
  int unsigned      vin16 = 0;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  assign com = comp_en && (vin16 > (32'(dac_code) << 8));

  sar_logic #(.N(N), .RES_W(RES_W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  function automatic int unsigned expected_code(int unsigned v, int unsigned r);
    int unsigned step = 32'd1 << (16 - r);
    int unsigned c;
    if (v == 0) return 0;
    c = (v - 1) / step;
    if (c > (32'd1 << r) - 1) c = (32'd1 << r) - 1;
    return c;
  endfunction

  // Mutual exclusion of the phase strobes.
  always @(negedge clk) if (rst_n) begin
    check(int'(sample) + int'(comp_en) + int'(eoc) <= 1, "phase strobes overlap");
  end

  task automatic one_conversion(input int unsigned r);
    int unsigned exp_c, nb, v;
    logic [N-1:0] bits;
    while (!sample) @(negedge clk);
    check(state == SAR_SAMPLE, "state is SAMPLE while sample is high");
    v = $urandom_range(0, 65535);
    if ($urandom_range(0, 9) == 0) v = 0;
    if ($urandom_range(0, 9) == 0) v = 65535;
    vin16 = v;
    exp_c = expected_code(v, r);
    nb = 0;
    bits = '0;
    @(negedge clk);
    while (!eoc && nb < 20) begin
      check(comp_en && state == SAR_BITCYCLE, "bit cycling between sample and EOC");
      bits = {bits[N-2:0], com};
      nb++;
      @(negedge clk);
    end
    check(nb == r, $sformatf("bit cycles %0d, expected %0d", nb, r));
    check(32'(dout) == exp_c, $sformatf("dout %0d, expected %0d (vin16=%0d, R=%0d)", dout, exp_c, v, r));
    check(32'(bits) == exp_c, $sformatf("serial bits %0h, expected %0h", bits, exp_c));
    check(32'(dac_code) == (exp_c << (N - r)), "DAC holds the converged code at EOC");
    @(negedge clk);
    check(sample, "next sample follows EOC: period N_EI + 2 clocks");
    check(32'(dout) == exp_c, "dout held after EOC");
  endtask

  initial begin
    int unsigned r;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(state == SAR_RESET && !sample, "held in reset while sar_en low");
    sar_en = 1'b1;
    r = N;
    for (int k = 0; k < 400; k++) begin
      if (k % 10 == 9) begin
        // RTDR update: two clocks of reset phase with a new resolution
        @(negedge clk);
        sar_en = 1'b0;
        r = $urandom_range(1, N);
        res = RES_W'(r - 1);
        @(negedge clk);
        check(state == SAR_RESET && dout == '0 && !sample && !eoc, "reset phase clears SAR");
        @(negedge clk);
        check(state == SAR_RESET, "still in reset phase");
        sar_en = 1'b1;
        @(negedge clk);
        check(sample, "sampling starts on the first clock with sar_en high");
      end
      one_conversion(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
