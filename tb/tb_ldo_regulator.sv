// End-to-end testbench of the digital LDO regulator, at default parameters.
//
// The testbench closes the loop around the regulator: an external 1 uF
// capacitor is integrated every 100 ns, dV_OUT = (I_SUPPLY - I_LOAD) dt / C,
// with the load current given by the scenario.  The clock is 1 MHz.
//
// Scenario A (0.25 V supply, 220 mV reference, like the simulated
// waveforms of the published design):
//   V_REF steps from 0 to 220 mV, no load until 400 us, then 20 uA for
//   1 ms, 200 uA for 400 us, 20 uA for 1 ms, then a load toggling between
//   20 uA and 200 uA every 50 us for 400 us.  The 20 uA intervals are
//   longer than in the published waveforms so that the slow discharge
//   after an over-voltage reset (20 mV/ms at 20 uA) has ended before the
//   steady-state window.
// Scenario B (0.30 V supply, 250 mV reference): load 0.1 mA, 1 mA, 0.1 mA,
//   then at 1 mA V_REF steps 220 -> 260 -> 280 -> 140 -> 220 mV, covering
//   the 0.14 V .. 0.28 V output range.
// Scenario C (0.25 V supply, 0.2 mA load): V_REF steps 200 mV -> 220 mV
//   -> 200 mV -> 140 mV, covering the 0.14 V .. 0.22 V output range.
//
// Checked: start-up reaches V_REF; in the last 100 us of every constant-load
// interval the mean output is within 3 mV of V_REF and the mean supply
// current within 5 % of the load (at least 3 uA, two unit steps); undershoot and overshoot after load steps
// stay within the limits set by the under- and over-voltage detectors
// (15 mV); after each V_REF step the output gets within 3 mV of the new
// reference in 300 us.  Every mechanism (crossing average, K steps,
// over-voltage reset to 0, saturation at 255, clamp at 0) must occur at
// least once.  A watchdog ends a hung run with a failure.
module tb_ldo_regulator;
  import ldo_pkg::*;

  localparam real C_EXT = 1.0e-6;
  localparam real DT    = 100.0e-9;

  logic       clk;
  logic       rst_n;
  real        v_in, v_ref, v_out, i_supply, v_bias, i_load;
  logic [7:0] n_on, n_cross;
  sense_t     sense;
  logic       update;

  int checks = 0;
  int failures = 0;

  ldo_regulator dut (
    .clk, .rst_n, .v_in, .v_ref, .v_out, .i_supply, .v_bias,
    .n_on, .n_cross, .sense, .update
  );

  initial clk = 1'b0;
  always #500 clk = ~clk;

  // Output node: capacitor charged by the switch array, discharged by the load.
  initial begin
    v_out = 0.0;
    forever begin
      #100;
      v_out = v_out + (i_supply - i_load) * DT / C_EXT;
      if (v_out < 0.0) v_out = 0.0;
    end
  end

  // Mechanism counters.
  int unsigned n_update, n_kstep, n_over_zero, n_sat_hi, n_clamp_lo;
  int unsigned n_reg_mismatch;
  logic [7:0] n_last;
  logic       avg_last;
  always @(posedge clk) begin
    if (rst_n) begin
      if (update && !sense.over) n_update <= n_update + 1;
      if (sense.under && !sense.cmp && !update && !sense.over) n_kstep <= n_kstep + 1;
      if (sense.over && n_last != 0) n_over_zero <= n_over_zero + 1;
      if (n_last == 8'hFF && !sense.cmp && !update && !sense.over) n_sat_hi <= n_sat_hi + 1;
      if (n_last == 8'h00 && sense.cmp && !update && !sense.over) n_clamp_lo <= n_clamp_lo + 1;
    end
    // after an averaging step both registers hold the same value
    if (avg_last && n_on != n_cross) n_reg_mismatch <= n_reg_mismatch + 1;
    n_last   <= n_on;
    avg_last <= rst_n && update && !sense.over;
  end

  // Statistics over a window.
  real win_v_sum, win_i_sum;
  int  win_n;
  bit  win_on;
  always @(posedge clk) begin
    if (win_on) begin
      win_v_sum <= win_v_sum + v_out;
      win_i_sum <= win_i_sum + i_supply;
      win_n     <= win_n + 1;
    end
  end
  real trk_max, trk_min;
  bit  trk_on;
  always @(negedge clk) begin
    if (trk_on) begin
      if (v_out > trk_max) trk_max <= v_out;
      if (v_out < trk_min) trk_min <= v_out;
    end
  end

  function automatic void expect_true(string what, bit cond, real a, real b);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: %f / %e at %0t", what, a, b, $time);
    end
  endfunction

  // Hold a load for `us` microseconds; check the last 100 us when asked.
  task automatic hold(real load, int us, bit check_it);
    i_load = load;
    if (us > 100) begin
      win_on = 1'b0;
      repeat (us - 100) @(posedge clk);
      win_v_sum = 0.0; win_i_sum = 0.0; win_n = 0; win_on = 1'b1;
      repeat (100) @(posedge clk);
      win_on = 1'b0;
      #1;
      if (check_it) begin
        real vm = win_v_sum / real'(win_n);
        real im = win_i_sum / real'(win_n);
        real dv = vm - v_ref;
        real di = im - load;
        // 5 % of the load, but at least two unit-switch steps (~3 uA at
        // 0.25 V) for light loads, where one step is a large fraction
        real tol = (0.05 * load > 3.0e-6) ? 0.05 * load : 3.0e-6;
        $display("  load %6.1f uA: mean V_OUT %7.3f mV, mean I_SUPPLY %7.2f uA",
                 load * 1e6, vm * 1e3, im * 1e6);
        expect_true("steady V_OUT near V_REF", dv < 0.003 && dv > -0.003, vm, v_ref);
        expect_true("supply tracks load", di < tol && di > -tol, im, load);
      end
    end else begin
      repeat (us) @(posedge clk);
    end
  endtask

  task automatic ripple_window_start();
    trk_max = -1.0; trk_min = 10.0; trk_on = 1'b1;
  endtask

  task automatic ripple_window_check(string what);
    real over  = trk_max - v_ref;
    real under = v_ref - trk_min;
    trk_on = 1'b0;
    $display("  %s: overshoot %5.2f mV, undershoot %5.2f mV", what, over * 1e3, under * 1e3);
    expect_true({what, " overshoot"},  over  < 0.015, over, 0.0);
    expect_true({what, " undershoot"}, under < 0.015, under, 0.0);
  endtask

  // V_REF step: count cycles until V_OUT is within 3 mV of the new value.
  task automatic ref_step(real new_ref, string what);
    int t;
    v_ref = new_ref;
    t = 0;
    while ((v_out - v_ref > 0.003 || v_ref - v_out > 0.003) && t < 2000) begin
      @(posedge clk);
      t++;
    end
    $display("  %s: within 3 mV after %0d us", what, t);
    expect_true({what, " settles in 300 us"}, t <= 300, real'(t), 0.0);
  endtask

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_start;
    n_update = 0; n_kstep = 0; n_over_zero = 0; n_sat_hi = 0; n_clamp_lo = 0;
    n_reg_mismatch = 0; avg_last = 1'b0;
    win_on = 1'b0; trk_on = 1'b0;
    v_in = 0.25; v_ref = 0.0; i_load = 0.0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- Scenario A ------------------------------------------------------
    $display("Scenario A: V_IN = 0.25 V, V_REF = 0.22 V");
    v_ref = 0.22;
    t_start = 0;
    while (v_out < v_ref && t_start < 1000) begin
      @(posedge clk);
      t_start++;
    end
    $display("  start-up: V_OUT reaches V_REF after %0d us", t_start);
    expect_true("switch bias 26 mV at 0.25 V", v_bias > 0.0255 && v_bias < 0.0265, v_bias, 0.0);
    expect_true("start-up within 400 us", t_start <= 400, real'(t_start), 0.0);
    hold(0.0, 400 - t_start, 1'b0);
    hold(20e-6, 1000, 1'b1);
    ripple_window_start();
    hold(200e-6, 400, 1'b1);
    hold(20e-6, 1000, 1'b1);
    ripple_window_check("20 uA <-> 200 uA steps");
    ripple_window_start();
    for (int i = 0; i < 4; i++) begin
      hold(200e-6, 50, 1'b0);
      hold(20e-6, 50, 1'b0);
    end
    ripple_window_check("20 uA <-> 200 uA toggling");

    // ---- Scenario B ------------------------------------------------------
    $display("Scenario B: V_IN = 0.30 V, V_REF = 0.25 V");
    v_in = 0.30;
    ref_step(0.25, "V_REF 220 -> 250 mV");
    hold(0.1e-3, 500, 1'b1);
    ripple_window_start();
    hold(1.0e-3, 500, 1'b1);
    hold(0.1e-3, 500, 1'b1);
    ripple_window_check("0.1 mA <-> 1 mA steps");
    i_load = 1.0e-3;
    ref_step(0.22, "V_REF 250 -> 220 mV at 1 mA");
    hold(1.0e-3, 400, 1'b1);
    ref_step(0.26, "V_REF 220 -> 260 mV at 1 mA");
    hold(1.0e-3, 400, 1'b1);
    ref_step(0.28, "V_REF 260 -> 280 mV at 1 mA");
    hold(1.0e-3, 400, 1'b1);
    ref_step(0.14, "V_REF 280 -> 140 mV at 1 mA");
    hold(1.0e-3, 400, 1'b1);
    ref_step(0.22, "V_REF 140 -> 220 mV at 1 mA");
    hold(1.0e-3, 400, 1'b1);

    // ---- Scenario C ------------------------------------------------------
    $display("Scenario C: V_IN = 0.25 V, I_LOAD = 0.2 mA, V_REF steps");
    v_in = 0.25;
    i_load = 0.2e-3;
    ref_step(0.20, "V_REF 250 -> 200 mV");
    hold(0.2e-3, 400, 1'b1);
    ref_step(0.22, "V_REF 200 -> 220 mV");
    hold(0.2e-3, 400, 1'b1);
    ref_step(0.20, "V_REF 220 -> 200 mV");
    hold(0.2e-3, 400, 1'b1);
    ref_step(0.14, "V_REF 200 -> 140 mV");
    hold(0.2e-3, 400, 1'b1);

    $display("mechanisms: crossing averages=%0d K steps=%0d over-voltage resets=%0d saturated at 255=%0d clamped at 0=%0d",
             n_update, n_kstep, n_over_zero, n_sat_hi, n_clamp_lo);
    expect_true("both registers hold the average", n_reg_mismatch == 0, real'(n_reg_mismatch), 0.0);
    expect_true("crossing average happened", n_update > 0, real'(n_update), 0.0);
    expect_true("K step happened", n_kstep > 0, real'(n_kstep), 0.0);
    expect_true("over-voltage reset happened", n_over_zero > 0, real'(n_over_zero), 0.0);
    expect_true("saturation at 255 happened", n_sat_hi > 0, real'(n_sat_hi), 0.0);
    expect_true("clamp at 0 happened", n_clamp_lo > 0, real'(n_clamp_lo), 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
