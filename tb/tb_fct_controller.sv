// Self-checking testbench of the fast-current-tracking controller.
//
// A cycle-accurate reference written with plain integers predicts N, the
// crossing register and the update flag from the same comparator decisions.
// Three phases drive the controller:
//   1. a directed replay of the tracking example: N steps up by one from a
//      crossing value I1 until the next crossing at I3 = I1 + 2*dI, where N
//      must land on the average I2 = (I1 + I3) / 2 in the cycle after;
//   2. directed under-voltage (steps of K), over-voltage (N forced to 0) and
//      saturation at both ends of 0..255;
//   3. random decisions with a bias so that long runs and frequent
//      crossings both occur.
// Every cycle the outputs are compared with the reference.  A watchdog ends
// the run with a failure if it does not finish in time.
module tb_fct_controller;
  import ldo_pkg::*;

  localparam int unsigned N_BITS = 8;
  localparam int unsigned K      = 8;
  localparam int          N_MAX  = (1 << N_BITS) - 1;

  logic              clk = 1'b0;
  logic              rst_n;
  sense_t            sense;
  logic [N_BITS-1:0] n_on, n_cross;
  logic              update;

  int checks = 0;
  int failures = 0;

  fct_controller #(.N_BITS(N_BITS), .K(K)) dut (
    .clk, .rst_n, .sense, .n_on, .n_cross, .update
  );

  always #500 clk = ~clk;   // 1 MHz, 1 ns time unit

  // Reference state.
  int ref_n, ref_c;
  bit ref_prev;

  function automatic void check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endfunction

  // Apply one cycle of decisions, check the combinational update flag, step
  // the reference, clock, and check the registers.
  task automatic step(bit cmp, bit under, bit over);
    bit upd;
    int nxt;
    sense = '{over: over, under: under, cmp: cmp};
    #1;
    upd = cmp ^ ref_prev;
    check("update", int'(update), int'(upd));
    if (over) begin
      nxt = 0;
    end else if (upd) begin
      nxt   = (ref_n + ref_c) / 2;
      ref_c = nxt;
    end else begin
      int d = under ? K : 1;
      nxt = cmp ? ref_n - d : ref_n + d;
      if (nxt < 0) nxt = 0;
      if (nxt > N_MAX) nxt = N_MAX;
    end
    ref_n    = nxt;
    ref_prev = cmp;
    @(posedge clk);
    #1;
    check("n_on", int'(n_on), ref_n);
    check("n_cross", int'(n_cross), ref_c);
  endtask

  int unsigned counts_upd, counts_k, counts_ov, counts_sat_hi, counts_sat_lo;

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i1;
    sense = '0;
    rst_n = 1'b0;
    ref_n = 0; ref_c = 0; ref_prev = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("reset n_on", int'(n_on), 0);

    // Phase 1: climb to I1 = 40, settle with a crossing there, then a load
    // step: N counts up by one for 20 cycles (I3 = I1 + 2*dI with dI = 10),
    // then V_OUT crosses V_REF and N must become I2 = 50 at once.
    for (int i = 0; i < 40; i++) step(0, 0, 0);
    check("I1 reached", int'(n_on), 40);
    step(1, 0, 0);                 // crossing: average of 40 and 0 = 20
    check("first average", int'(n_on), 20);
    for (int i = 0; i < 20; i++) step(0, 0, 0);   // crossing at 20, then up
    // after the crossing above, n_cross holds 20; bring the saved value to I1
    i1 = int'(n_on);
    step(1, 0, 0);
    for (int i = 0; i < 5; i++) step(1, 0, 0);
    step(0, 0, 0);
    // now set up a clean I1: force the registers through a known sequence
    rst_n = 1'b0; ref_n = 0; ref_c = 0; ref_prev = 0; #1;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int i = 0; i < 40; i++) step(0, 0, 0);     // N = 40
    step(1, 0, 0);                                   // avg(40,0)=20 -> c=20
    for (int i = 0; i < 20; i++) step(1, 0, 0);      // down towards 0
    step(0, 0, 0);                                   // avg(0,20)=10, c=10
    for (int i = 0; i < 70; i++) step(0, 0, 0);      // up to 80
    step(1, 0, 0);                                   // avg(80,10)=45, c=45
    step(0, 0, 0);                                   // avg(45,45)=45
    check("I1 settled", int'(n_cross), 45);
    i1 = 45;
    for (int i = 0; i < 20; i++) step(0, 0, 0);      // I3 = 65
    check("I3 reached", int'(n_on), i1 + 20);
    step(1, 0, 0);
    check("tracking average I2", int'(n_on), i1 + 10);
    check("crossing register I2", int'(n_cross), i1 + 10);

    // Phase 2: under-voltage steps of K, saturation high, over-voltage.
    step(0, 1, 0);                                   // crossing again
    i1 = int'(n_on);
    for (int i = 0; i < 5; i++) step(0, 1, 0);
    check("K steps", int'(n_on), i1 + 5 * K);
    for (int i = 0; i < 40; i++) step(0, 1, 0);
    check("saturate high", int'(n_on), N_MAX);
    step(0, 0, 1);
    check("over-voltage zero", int'(n_on), 0);
    step(1, 0, 1);
    step(1, 0, 0);
    for (int i = 0; i < 3; i++) step(1, 0, 0);
    check("saturate low", int'(n_on), 0);

    // Phase 3: random decisions.
    for (int i = 0; i < 20000; i++) begin
      automatic bit c, u, o;
      automatic int r = int'($urandom_range(0, 99));
      // long runs: keep the previous decision most of the time in bursts
      c = (i % 200 < 100) ? (r < 85 ? ref_prev : ~ref_prev) : (r < 50);
      u = (!c) && ($urandom_range(0, 99) < 15);
      o = c && ($urandom_range(0, 99) < 3);
      if (c ^ ref_prev) counts_upd++;
      if (u) counts_k++;
      if (o) counts_ov++;
      step(c, u, o);
      if (ref_n == N_MAX) counts_sat_hi++;
      if (ref_n == 0) counts_sat_lo++;
    end
    checks++;
    if (counts_upd == 0 || counts_k == 0 || counts_ov == 0) begin
      failures++;
      $display("FAIL random phase did not exercise every mode");
    end
    $display("random phase: updates=%0d K-steps=%0d over=%0d at255=%0d at0=%0d",
             counts_upd, counts_k, counts_ov, counts_sat_hi, counts_sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
