// analog_ei_tb: self-checking testbench of the EI-local S/H plus comparator.
//
// The front-end voltage changes after each sample; the comparator output during the compare
// strobe must reflect the voltage held at the falling edge of sample, not the live one, and
// must be 0 while the strobe is low. A second instance without S/H (a DC-node monitor) must
// compare the live voltage instead.
module analog_ei_tb;

  real  v_afe = 0.0, v_dac = 0.0;
  logic sample = 1'b0, comp_en = 1'b0;
  logic com, com_dc;

  int checks = 0;
  int failures = 0;

  analog_ei dut (.*);
  analog_ei #(.HAS_SH(1'b0)) dut_dc (.v_afe(v_afe), .v_dac(v_dac), .sample(sample),
                                     .comp_en(comp_en), .com(com_dc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    real held;
    for (int k = 0; k < 200; k++) begin
      sample = 1'b1;
      v_afe = $urandom_range(0, 800) / 1000.0;
      #1 sample = 1'b0;
      held = v_afe;
      #1 v_afe = $urandom_range(0, 800) / 1000.0;
      repeat (4) begin
        v_dac = $urandom_range(0, 800) / 1000.0;
        comp_en = 1'b0;
        #1;
        check(com == 1'b0, "output 0 while not comparing");
        comp_en = 1'b1;
        #1;
        check(com == (held > v_dac), "compares the held voltage");
        check(com_dc == (v_afe > v_dac), "DC-node EI compares the live voltage");
      end
      comp_en = 1'b0;
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
