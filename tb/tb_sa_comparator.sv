// Self-checking testbench of the clocked comparator model.
//
// Random input pairs are applied while the clock is low; after each rising
// edge the output must equal the sign of (v_p - v_n), and it must not move
// when the inputs change again before the next rising edge (the latch holds).
// A second instance with a 5 mV offset checks that small differences below
// the offset read as 0.  A watchdog ends a hung run with a failure.
module tb_sa_comparator;
  logic clk = 1'b0;
  real  v_p, v_n;
  logic q, q_off;

  int checks = 0;
  int failures = 0;

  sa_comparator dut (.clk, .v_p, .v_n, .q);
  sa_comparator #(.V_OFFSET(0.005)) dut_off (.clk, .v_p, .v_n, .q(q_off));

  function automatic void check(string what, bit got, bit exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t (v_p=%f v_n=%f)",
               what, got, exp, $time, v_p, v_n);
    end
  endfunction

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp, exp_off;
    v_p = 0.0; v_n = 0.0;
    for (int i = 0; i < 2000; i++) begin
      // inputs settle while clock is low
      v_n = 0.22;
      v_p = 0.22 + (real'($urandom_range(0, 4000)) - 2000.0) * 1.0e-5; // +-20 mV
      exp     = (v_p - v_n) > 0.0;
      exp_off = (v_p - v_n) > 0.005;
      #250 clk = 1'b1;
      #10;
      check("decision", q, exp);
      check("decision with offset", q_off, exp_off);
      // inputs move the other way while the clock is high: no change
      v_p = exp ? 0.10 : 0.30;
      #240;
      check("hold while clock high", q, exp);
      clk = 1'b0;
      #250;
      check("hold while clock low", q, exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
