// Fast-current-tracking digital controller of the low-dropout regulator.
//
// Every clock cycle the controller moves the on-switch number N (register #1)
// up or down by a step dN, using the comparator decision latched at the
// previous clock edge: down when V_OUT was above V_REF, up otherwise.  dN is 1
// normally and K while the under-voltage comparator reports V_OUT < V_REF_L.
//
// Fast current tracking: whenever the comparator decision differs from the
// one before it, V_OUT has crossed V_REF and the one-cycle "update" signal is
// raised.  In that cycle the operand multiplexer (MUX1) feeds register #2 (the
// N saved at the previous crossing) to the adder instead of dN, the adder
// adds, and the result multiplexer (MUX2) takes the sum shifted right by one
// bit, L[9:2] instead of L[8:1].  Both registers then load this average, so
// N jumps to the mean of the values at the last two crossings and the ringing
// of a plain up/down counter loop disappears.
//
// Over-voltage (V_OUT > V_REF_H) forces N to 0 at the next clock edge and has
// priority over everything else.  Outside the averaging step the result is
// clamped to 0..2**N_BITS-1.
//
// Interface and timing
//   clk, rst_n : rising-edge clock (1 MHz in the published chip), active-low
//                asynchronous reset that clears both registers
//   sense      : comparator decisions, already latched by the comparators at
//                the previous rising edge, held for the whole cycle
//   n_on       : register #1, the on-switch number driving the switch array
//   n_cross    : register #2, the N stored at the last crossing
//   update     : high for the cycle in which the average is taken
//
// Concurrent assertions check three rules in simulation: N is 0 after an
// over-voltage cycle, both registers are equal after an averaging cycle, and
// a counting cycle moves N by at most K.  The reset is asynchronous while
// the assertions sample it at the clock, which Verilator reports as a
// mixed synchronous/asynchronous use of rst_n; that use is intended.
//
// Follows the published design: 8-bit registers, adder/subtractor with the
// two multiplexers and the L[9:2]/L[8:1] selection, dN of 1 or K with K = 8,
// N forced to 0 on over-voltage, N kept within 0..255.  This implementation's
// own choices: the crossing is detected as a change of the latched comparator
// decision against the one of the previous cycle; register #2 is written with
// a synchronous enable from the main clock instead of a separately gated CLK2
// pulse; the adder adds during the averaging step whatever the comparator
// says; over-voltage clears only register #1; the saturation logic (not
// drawn in the published schematic) clamps the counting result.
module fct_controller
  import ldo_pkg::*;
#(
  parameter int unsigned N_BITS = N_BITS_DEFAULT,
  parameter int unsigned K      = K_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  sense_t            sense,
  output logic [N_BITS-1:0] n_on,
  output logic [N_BITS-1:0] n_cross,
  output logic              update
);

  localparam logic [N_BITS-1:0] N_MAX = '1;
  localparam logic [N_BITS-1:0] K_STEP = N_BITS'(K);

  logic              cmp_prev;    // comparator decision of the previous cycle
  logic [N_BITS-1:0] delta_n;     // 1 or K
  logic [N_BITS-1:0] mux1;        // second adder operand
  logic              subtract;    // adder/subtractor mode
  logic [N_BITS:0]   l_sum;       // adder result L[9:1]
  logic              underflow;   // subtraction went below zero
  logic [N_BITS-1:0] counted;     // clamped L[8:1]
  logic [N_BITS-1:0] mux2;        // value presented to register #1

  // A voltage crossing shows up as a change of the comparator decision.
  assign update   = sense.cmp ^ cmp_prev;

  assign delta_n  = sense.under ? K_STEP : N_BITS'(1);
  assign mux1     = update ? n_cross : delta_n;
  assign subtract = sense.cmp & ~update;

  always_comb begin
    if (subtract) begin
      l_sum     = {1'b0, n_on} - {1'b0, mux1};
      underflow = (mux1 > n_on);
    end else begin
      l_sum     = {1'b0, n_on} + {1'b0, mux1};
      underflow = 1'b0;
    end
  end

  // Saturation of the counting path to 0..N_MAX.
  always_comb begin
    if (underflow)          counted = '0;
    else if (l_sum[N_BITS]) counted = N_MAX;
    else                    counted = l_sum[N_BITS-1:0];
  end

  // MUX2: halved sum during the averaging step, counted value otherwise.
  assign mux2 = update ? l_sum[N_BITS:1] : counted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_on     <= '0;
      n_cross  <= '0;
      cmp_prev <= 1'b0;
    end else begin
      cmp_prev <= sense.cmp;
      if (sense.over) begin
        n_on <= '0;
      end else begin
        n_on <= mux2;
        if (update) n_cross <= mux2;
      end
    end
  end

  // Rules of the published behaviour, checked in simulation.
  // Over-voltage: N is 0 after the next edge.
  a_over_zero: assert property (@(posedge clk) disable iff (!rst_n)
    sense.over |=> n_on == '0);
  // Averaging: both registers hold the same value afterwards.
  a_avg_both: assert property (@(posedge clk) disable iff (!rst_n)
    (update && !sense.over) |=> n_on == n_cross);
  // Counting moves N by at most K per cycle outside averaging and resets.
  a_step_bound: assert property (@(posedge clk) disable iff (!rst_n)
    (!update && !sense.over) |=>
      ((n_on >= $past(n_on)) ? (n_on - $past(n_on)) : ($past(n_on) - n_on)) <= K_STEP);

  // Elaboration-time check of the step size.
  if (K < 1 || K >= (1 << N_BITS)) begin : g_bad_k
    $error("K must lie in 1..2**N_BITS-1");
  end

endmodule
