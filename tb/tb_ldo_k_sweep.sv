// Undershoot of the regulator against the coarse step K.
//
// Six regulators with K = 1, 2, 4, 8, 16 and 32 run side by side, each with
// its own 1 uF output capacitor integrated every 100 ns.  Two operating
// points are run in turn:
//   P1: V_IN = 0.30 V, V_REF = 0.25 V, load step 0.1 mA -> 1 mA
//   P2: V_IN = 0.25 V, V_REF = 0.22 V, load step 20 uA -> 0.2 mA
// After settling at the light load, the load steps up and the deepest
// undershoot below V_REF in the next 300 us is recorded for each K.
// Checked: at the light step every K stays within 15 mV; at the heavy step
// the undershoot does not grow from one K to the next larger one, K >= 8
// stays within 15 mV, and K = 8 at least halves the K = 1 undershoot (the
// published sweep drops from about 40 mV at K = 1 to about 11 mV at K = 8).
module tb_ldo_k_sweep;
  import ldo_pkg::*;

  localparam int NK = 6;
  localparam int KS [NK] = '{1, 2, 4, 8, 16, 32};
  localparam real C_EXT = 1.0e-6;
  localparam real DT    = 100.0e-9;

  logic clk;
  logic rst_n;
  real  v_in, v_ref, i_load;
  real  v_out [NK];
  real  v_min [NK];
  bit   track;

  int checks = 0;
  int failures = 0;

  initial clk = 1'b0;
  always #500 clk = ~clk;

  for (genvar g = 0; g < NK; g++) begin : g_k
    real        i_supply;
    // observation outputs, not used here
    real        v_bias;
    logic [7:0] n_on, n_cross;
    sense_t     sense;
    logic       update;

    ldo_regulator #(.K(KS[g])) dut (
      .clk, .rst_n, .v_in, .v_ref, .v_out(v_out[g]), .i_supply, .v_bias,
      .n_on, .n_cross, .sense, .update
    );

    initial begin
      v_out[g] = 0.0;
      forever begin
        #100;
        v_out[g] = v_out[g] + (i_supply - i_load) * DT / C_EXT;
        if (v_out[g] < 0.0) v_out[g] = 0.0;
        if (track && v_out[g] < v_min[g]) v_min[g] = v_out[g];
      end
    end
  end

  function automatic void expect_true(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  task automatic run_point(real vin, real vref, real light, real heavy, string name,
                           output real under [NK]);
    v_in = vin; v_ref = vref; i_load = light;
    repeat (1500) @(posedge clk);
    foreach (v_min[k]) v_min[k] = 10.0;
    track = 1'b1;
    i_load = heavy;
    repeat (300) @(posedge clk);
    track = 1'b0;
    $write("%s undershoot [mV]:", name);
    foreach (under[k]) begin
      under[k] = v_ref - v_min[k];
      $write("  K=%0d %5.2f", KS[k], under[k] * 1e3);
    end
    $write("\n");
  endtask

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real u1 [NK], u2 [NK];
    track = 1'b0;
    v_in = 0.30; v_ref = 0.0; i_load = 0.0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_point(0.30, 0.25, 0.1e-3, 1.0e-3, "P1 0.30 V / 250 mV / 0.1->1 mA", u1);
    run_point(0.25, 0.22, 20e-6, 0.2e-3, "P2 0.25 V / 220 mV / 20->200 uA", u2);
    for (int k = 0; k < NK; k++) begin
      expect_true($sformatf("P2 K=%0d within 15 mV", KS[k]), u2[k] < 0.015);
      if (KS[k] >= 8)
        expect_true($sformatf("P1 K=%0d within 15 mV", KS[k]), u1[k] < 0.015);
      if (k > 0)
        expect_true($sformatf("P1 K=%0d not worse than K=%0d", KS[k], KS[k-1]),
                    u1[k] <= u1[k-1] + 1e-4);
    end
    expect_true("P1 K=8 halves the K=1 undershoot", u1[3] < 0.5 * u1[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
