// Self-checking testbench of the switch bias model.
//
// Checks the printed operating point (V_BIAS = 26 mV, V_FB = 224 mV at
// V_IN = 0.25 V), that the forward bias stays between 0 and 280 mV across
// the 0.25 V .. 1.2 V supply range, and that V_BIAS rises with V_IN.
module tb_switch_bias;
  real v_in, v_bias;

  int checks = 0;
  int failures = 0;

  switch_bias dut (.v_in, .v_bias);

  task automatic expect_true(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (v_in=%f v_bias=%f)", what, v_in, v_bias);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real prev;
    v_in = 0.25;
    #1;
    expect_true("26 mV at 0.25 V", v_bias > 0.0255 && v_bias < 0.0265);
    expect_true("224 mV forward bias at 0.25 V",
                (v_in - v_bias) > 0.2235 && (v_in - v_bias) < 0.2245);
    prev = -1.0;
    for (int mv = 250; mv <= 1200; mv += 5) begin
      v_in = real'(mv) * 1.0e-3;
      #1;
      expect_true("forward bias below 280 mV", (v_in - v_bias) <= 0.2801);
      expect_true("forward bias positive", (v_in - v_bias) > 0.0);
      expect_true("bias rises with supply", v_bias > prev);
      prev = v_bias;
    end
    v_in = 1.2;
    #1;
    expect_true("280 mV at 1.2 V", (v_in - v_bias) > 0.2795);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
