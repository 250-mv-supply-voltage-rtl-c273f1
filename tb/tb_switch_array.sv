// Self-checking testbench of the switch array model.
//
// Checks the printed full-array currents at a 50 mV drop (630 uA at 0.25 V
// and 1.78 mA at 0.30 V with the nominal 224 mV forward bias, 204 uA and
// 0.65 mA with the well tied to the supply), the binary weights of the eight
// switches against the single-unit current, the subthreshold drain law
// 1 - exp(-drop / 25.9 mV) normalised to the 50 mV drop, and that no current
// flows when V_OUT is not below V_IN.
module tb_switch_array;
  logic [7:0] n_on;
  real v_in, v_out, v_bias, i_supply;

  int checks = 0;
  int failures = 0;

  switch_array dut (.n_on, .v_in, .v_out, .v_bias, .i_supply);

  task automatic near(string what, real got, real exp, real rel);
    real err = got - exp;
    if (err < 0.0) err = -err;
    checks++;
    if (err > rel * (exp < 0.0 ? -exp : exp) + 1e-12) begin
      failures++;
      $display("FAIL %s: got %e expected %e", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drain-voltage factor relative to the 50 mV reference drop
  function automatic real g(real drop);
    return (1.0 - $exp(-drop / 0.0259)) / (1.0 - $exp(-0.05 / 0.0259));
  endfunction

  initial begin
    real unit;
    n_on = 8'hFF;
    v_in = 0.25; v_out = 0.20; v_bias = 0.25 - 0.224; #1;
    near("630 uA with forward bias at 0.25 V", i_supply, 630.0e-6, 1e-6);
    v_bias = 0.25; #1;
    near("204 uA without forward bias at 0.25 V", i_supply, 204.0e-6, 1e-6);
    v_in = 0.30; v_out = 0.25; v_bias = 0.30 - 0.224; #1;
    near("1.78 mA with forward bias at 0.30 V", i_supply, 1.78e-3, 1e-6);
    v_bias = 0.30; #1;
    near("0.65 mA without forward bias at 0.30 V", i_supply, 0.65e-3, 1e-6);

    // binary weights
    v_in = 0.25; v_out = 0.22; v_bias = 0.026;
    n_on = 8'd1; #1;
    unit = i_supply;
    near("unit current", unit, 630.0e-6 / 255.0 * g(0.03), 1e-6);
    for (int b = 0; b < 8; b++) begin
      n_on = 8'(1 << b); #1;
      near($sformatf("weight of switch %0d", b + 1), i_supply, unit * real'(1 << b), 1e-9);
    end
    for (int i = 0; i < 200; i++) begin
      n_on = 8'($urandom_range(0, 255)); #1;
      near("random N", i_supply, unit * real'(n_on), 1e-9);
    end
    // drain law
    n_on = 8'd100;
    v_out = 0.24; #1;
    near("drop 10 mV", i_supply, 630.0e-6 / 255.0 * 100.0 * g(0.01), 1e-6);
    v_out = 0.249; #1;
    near("drop 1 mV, near-linear", i_supply, 630.0e-6 / 255.0 * 100.0 * 0.001 / 0.0259
                                             / (1.0 - $exp(-0.05 / 0.0259)), 0.03);
    n_on = 8'hFF;
    v_in = 0.30; v_out = 0.28; v_bias = 0.30 - 0.224; #1;
    near("1 mA possible at 0.30 V, 20 mV drop", i_supply, 1.78e-3 * g(0.02), 1e-6);
    checks++;
    if (i_supply < 1.0e-3) begin
      failures++;
      $display("FAIL full array below 1 mA at 0.30 V / 0.28 V");
    end
    n_on = 8'd100;
    v_in = 0.25; v_bias = 0.026;
    v_out = 0.25; #1;
    near("no drop", i_supply, 0.0, 0.0);
    v_out = 0.26; #1;
    near("reverse drop", i_supply, 0.0, 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
