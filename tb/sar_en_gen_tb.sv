// sar_en_gen_tb: self-checking testbench of the update synchronizer / SAR_EN generator.
//
// The update toggle and new SEL / RES values are changed at random times unrelated to
// CLK (as the TCK domain would). For each update the testbench checks that SAR_EN goes low
// within 4 clocks, stays low for exactly 2 clocks, and that the CLK-domain SEL / RES hold
// the new values when SAR_EN rises. It also checks the 2-clock low phase after reset and
// that SAR_EN stays high when nothing is updated.
module sar_en_gen_tb;

  localparam int unsigned SEL_W = 2;
  localparam int unsigned RES_W = 3;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             upd_toggle = 1'b0;
  logic [SEL_W-1:0] sel_in = '0;
  logic [RES_W-1:0] res_in = '0;
  logic             sar_en;
  logic [SEL_W-1:0] sel;
  logic [RES_W-1:0] res;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  sar_en_gen #(.SEL_W(SEL_W), .RES_W(RES_W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // Count consecutive low clocks of sar_en starting at the current negedge.
  task automatic measure_low(output int lat, output int low);
    lat = 0;
    while (sar_en && lat < 10) begin
      @(negedge clk);
      lat++;
    end
    low = 0;
    while (!sar_en && low < 10) begin
      @(negedge clk);
      low++;
    end
  endtask

  initial begin
    int lat, low;
    logic [SEL_W-1:0] s;
    logic [RES_W-1:0] r;
    #17 rst_n = 1'b1;
    @(negedge clk);
    low = 0;
    while (!sar_en && low < 10) begin
      low++;
      @(negedge clk);
    end
    check(low == 2, $sformatf("SAR_EN low %0d clocks after reset, expected 2", low));
    for (int k = 0; k < 60; k++) begin
      repeat ($urandom_range(3, 8)) @(negedge clk);
      check(sar_en, "SAR_EN stays high without an update");
      #($urandom_range(0, 9));
      s = SEL_W'($urandom);
      r = RES_W'($urandom);
      sel_in = s;
      res_in = r;
      upd_toggle = ~upd_toggle;
      @(negedge clk);
      measure_low(lat, low);
      check(lat <= 4, $sformatf("update seen after %0d clocks", lat));
      check(low == 2, $sformatf("SAR_EN low for %0d clocks, expected 2", low));
      check(sel == s && res == r, "new SEL / RES loaded during the reset phase");
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
