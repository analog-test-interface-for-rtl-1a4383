// comparator_tb: self-checking testbench of the latch comparator model.
//
// Random input / DAC voltages with the comparator enabled and disabled; with an offset of
// 10 mV in a second instance. The output must be (vin > vdac + offset) when enabled and 0
// otherwise.
module comparator_tb;

  real  vin, vdac;
  logic enable;
  logic com, com_off;

  int checks = 0;
  int failures = 0;

  comparator dut (.vin(vin), .vdac(vdac), .enable(enable), .com(com));
  comparator #(.OFFSET_V(0.01)) dut_off (.vin(vin), .vdac(vdac), .enable(enable), .com(com_off));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (vin=%f vdac=%f en=%b)", what, vin, vdac, enable);
    end
  endtask

  initial begin
    for (int k = 0; k < 500; k++) begin
      vin = $urandom_range(0, 800) / 1000.0;
      vdac = $urandom_range(0, 800) / 1000.0;
      enable = 1'($urandom);
      #1;
      check(com == (enable && (vin - vdac > 0.0)), "decision");
      check(com_off == (enable && (vin - vdac > 0.01)), "decision with offset");
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
