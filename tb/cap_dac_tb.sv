// cap_dac_tb: self-checking testbench of the DAC model.
//
// For every 8-bit code and three reference voltages it checks the output against
// vref * code / 256, and that the output rises monotonically with the code.
module cap_dac_tb;

  logic [7:0] code;
  real        vref;
  real        vout;

  int checks = 0;
  int failures = 0;

  cap_dac #(.N(8)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    real refs[3] = '{0.8, 1.0, 0.5};
    real prev, expv;
    foreach (refs[j]) begin
      vref = refs[j];
      prev = -1.0;
      for (int c = 0; c < 256; c++) begin
        code = 8'(c);
        #1;
        expv = refs[j] * c / 256.0;
        check(vout > expv - 1e-9 && vout < expv + 1e-9,
              $sformatf("code %0d vref %f: %f expected %f", c, vref, vout, expv));
        check(vout > prev, "monotonic");
        prev = vout;
      end
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
