// sample_hold_tb: self-checking testbench of the sample-and-hold model.
//
// A changing input is applied; the output must follow it while sample is high and keep the
// value present at the falling edge of sample while sample is low.
module sample_hold_tb;

  real  vin = 0.0;
  logic sample = 1'b0;
  real  vout;

  int checks = 0;
  int failures = 0;

  sample_hold dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (vin=%f vout=%f)", what, vin, vout);
    end
  endtask

  initial begin
    real held;
    #1;
    check(vout == 0.0, "holds 0 V before the first sample");
    for (int k = 0; k < 100; k++) begin
      sample = 1'b1;
      repeat (3) begin
        vin = $urandom_range(0, 800) / 1000.0;
        #1;
        check(vout == vin, "tracks while sampling");
      end
      held = vin;
      sample = 1'b0;
      repeat (5) begin
        #1 vin = $urandom_range(0, 800) / 1000.0;
        #1;
        check(vout == held, "holds after the falling edge of sample");
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
