// Self-checking testbench of the voltage sensing model.
//
// For several references the output voltage is placed just above and just
// below the three thresholds, computed here independently from the
// published percentages: V_REF (regulation), V_REF_H = 1.05 * V_REF
// (over-voltage) and V_REF_L = 0.975 * V_REF (under-voltage); for 220 mV
// these are 231 mV and 214.5 mV.  Random voltages between 0 and 300 mV
// follow.  Decisions are read one edge after the voltages are applied.
module tb_voltage_sensing;
  import ldo_pkg::*;

  logic   clk = 1'b0;
  real    v_out, v_ref;
  sense_t sense;

  int checks = 0;
  int failures = 0;

  voltage_sensing dut (.clk, .v_out, .v_ref, .sense);

  always #500 clk = ~clk;

  task automatic apply_and_check(real vo, real vr);
    bit e_cmp, e_over, e_under;
    v_out = vo;
    v_ref = vr;
    e_cmp   = vo > vr;
    e_over  = vo > 1.05 * vr;
    e_under = vo < 0.975 * vr;
    @(posedge clk);
    #1;
    checks++;
    if (sense.cmp != e_cmp || sense.over != e_over || sense.under != e_under) begin
      failures++;
      $display("FAIL v_out=%f v_ref=%f: got c/o/u=%0b%0b%0b expected %0b%0b%0b",
               vo, vr, sense.cmp, sense.over, sense.under, e_cmp, e_over, e_under);
    end
  endtask

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic real refs[4] = '{0.22, 0.15, 0.25, 0.14};
    @(negedge clk);
    // printed example: 231 mV and 214.5 mV around a 220 mV reference
    apply_and_check(0.2312, 0.22);
    apply_and_check(0.2308, 0.22);
    apply_and_check(0.2143, 0.22);
    apply_and_check(0.2147, 0.22);
    foreach (refs[r]) begin
      automatic real vr = refs[r];
      automatic real pts[6];
      pts = '{vr * 1.05 + 1e-4, vr * 1.05 - 1e-4, vr + 1e-4, vr - 1e-4,
              vr * 0.975 + 1e-4, vr * 0.975 - 1e-4};
      foreach (pts[p]) apply_and_check(pts[p], vr);
    end
    for (int i = 0; i < 3000; i++)
      apply_and_check(real'($urandom_range(0, 3000)) * 1.0e-4, 0.22);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
