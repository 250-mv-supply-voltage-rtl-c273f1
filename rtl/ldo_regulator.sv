// Digital low-dropout regulator for a 0.25 V supply: top level.
//
// A clocked comparator compares the output voltage V_OUT with the reference
// V_REF once per clock cycle, a digital controller turns that decision into
// an on-switch number N, and a binary-weighted PMOS switch array sources a
// current proportional to N from V_IN into the output node.  The output
// capacitor and the load are outside this block: the block takes V_OUT as an
// input and delivers the current I_SUPPLY, and the surrounding circuit (or
// testbench) integrates (I_SUPPLY - I_LOAD) / C_EXT.
//
// Parts:
//   voltage_sensing : three comparators and two dividers -> cmp, over, under
//   fct_controller  : up/down counter with crossing-average tracking, steps
//                     of K on under-voltage, N = 0 on over-voltage (RTL)
//   switch_bias     : N-well forward-bias generator for the switch array
//   switch_array    : eight PMOS switches weighted 1..128
// Only the controller is synthesizable logic.  The sensing circuit, the bias
// generator and the switch array are analog and appear here as behavioural
// models with real-valued voltage and current ports, so this top level as a
// whole is a behavioural model for system simulation.
//
// Timing: the comparators latch on the rising clock edge; the controller
// uses those decisions during the following cycle and updates N on the next
// rising edge, so N reacts to V_OUT with one cycle of latency (1 us at the
// intended 1 MHz clock).
//
// Ports
//   clk, rst_n : comparator and controller clock, active-low reset
//   v_in       : supply [V]          v_ref : reference [V]
//   v_out      : output node voltage [V], fed back from the external capacitor
//   i_supply   : current delivered into the output node [A]
//   v_bias     : N-well bias of the switches [V]
//   n_on       : on-switch number N
//   n_cross    : N stored at the last V_OUT/V_REF crossing
//   sense      : latched comparator decisions (for observation)
//   update     : high in cycles in which N is replaced by a crossing average
module ldo_regulator
  import ldo_pkg::*;
#(
  parameter int unsigned N_BITS = N_BITS_DEFAULT,
  parameter int unsigned K      = K_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  real               v_in,
  input  real               v_ref,
  input  real               v_out,
  output real               i_supply,
  output real               v_bias,
  output logic [N_BITS-1:0] n_on,
  output logic [N_BITS-1:0] n_cross,
  output sense_t            sense,
  output logic              update
);

  voltage_sensing u_sense (
    .clk, .v_out, .v_ref, .sense
  );

  fct_controller #(.N_BITS(N_BITS), .K(K)) u_ctrl (
    .clk, .rst_n, .sense, .n_on, .n_cross, .update
  );

  switch_bias u_bias (
    .v_in, .v_bias
  );

  switch_array #(.N_BITS(N_BITS)) u_array (
    .n_on, .v_in, .v_out, .v_bias, .i_supply
  );

endmodule
