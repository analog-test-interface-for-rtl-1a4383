// ei_mux_tb: self-checking testbench of the EI multiplexer.
//
// Exhaustively applies every SEL value (including out-of-range ones of a 3-EI instance) and
// every combination of comparator outputs and strobes, and checks that only the selected
// EI's comparator reaches com_out and that only the selected EI receives sample / comp_en.
module ei_mux_tb;

  localparam int unsigned NUM   = 3;
  localparam int unsigned SEL_W = 2;

  logic [SEL_W-1:0] sel;
  logic [NUM-1:0]   com_in;
  logic             sample_in, comp_en_in;
  logic             com_out;
  logic [NUM-1:0]   sample_out, comp_en_out;

  int checks = 0;
  int failures = 0;

  ei_mux #(.NUM(NUM), .SEL_W(SEL_W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (sel=%0d com_in=%b)", what, sel, com_in);
    end
  endtask

  initial begin
    for (int s = 0; s < (1 << SEL_W); s++) begin
      for (int c = 0; c < (1 << NUM); c++) begin
        for (int st = 0; st < 4; st++) begin
          logic          exp_com;
          logic [NUM-1:0] exp_s, exp_e;
          sel = SEL_W'(s);
          com_in = NUM'(c);
          {sample_in, comp_en_in} = 2'(st);
          exp_com = (s < NUM) ? c[s] : 1'b0;
          exp_s = (s < NUM && sample_in) ? NUM'(1 << s) : '0;
          exp_e = (s < NUM && comp_en_in) ? NUM'(1 << s) : '0;
          #1;
          check(com_out == exp_com, "com_out");
          check(sample_out == exp_s, "sample routed to selected EI only");
          check(comp_en_out == exp_e, "comp_en routed to selected EI only");
        end
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
