// Behavioural model of the voltage sensing circuit of the regulator.
//
// Three clocked comparators watch the output voltage V_OUT:
//   cmp   : V_OUT   against V_REF            (regulation loop)
//   over  : V_OUT_L against V_REF            (over-voltage detection)
//   under : V_REF_L against V_OUT            (under-voltage detection)
// Two resistor dividers avoid the need for extra reference voltages.
//   V_REF_L = R_L2 / (R_L1 + R_L2) * V_REF        (below V_REF)
//   V_OUT_L = R_H2 / (R_H1 + R_H2) * V_OUT
// so that the over-voltage comparator trips when V_OUT exceeds
//   V_REF_H = (R_H1 + R_H2) / R_H2 * V_REF.
// The default resistances (arbitrary common unit, only their ratios matter)
// put V_REF_H 5 % above and V_REF_L 2.5 % below V_REF, i.e. 231 mV and
// 214.5 mV for V_REF = 220 mV, as in the published design.  The filter
// capacitors that protect both divider taps from comparator kickback are not
// modelled: the taps are ideal.  Each comparator has its own offset
// parameter for mismatch studies; all are 0 by default.
//
// This file is a behavioural model (resistors and comparators are analog),
// not synthesizable logic.  All three decisions are latched at the same
// rising edge of clk and presented as one sense_t bundle.
//
// Ports
//   clk   : comparator clock
//   v_out : regulator output voltage [V]
//   v_ref : reference voltage [V]
//   sense : {over, under, cmp} decisions (see ldo_pkg)
module voltage_sensing
  import ldo_pkg::*;
#(
  parameter real R_H1 = 5.0,
  parameter real R_H2 = 100.0,
  parameter real R_L1 = 2.5,
  parameter real R_L2 = 97.5,
  parameter real V_OFFSET_CMP   = 0.0,
  parameter real V_OFFSET_OVER  = 0.0,
  parameter real V_OFFSET_UNDER = 0.0
) (
  input  logic   clk,
  input  real    v_out,
  input  real    v_ref,
  output sense_t sense
);

  real v_out_l;   // divided output voltage
  real v_ref_l;   // divided reference voltage

  always_comb begin
    v_out_l = v_out * R_H2 / (R_H1 + R_H2);
    v_ref_l = v_ref * R_L2 / (R_L1 + R_L2);
  end

  logic q_cmp, q_over, q_under;

  sa_comparator #(.V_OFFSET(V_OFFSET_CMP)) u_cmp (
    .clk, .v_p(v_out), .v_n(v_ref), .q(q_cmp)
  );

  sa_comparator #(.V_OFFSET(V_OFFSET_OVER)) u_over (
    .clk, .v_p(v_out_l), .v_n(v_ref), .q(q_over)
  );

  sa_comparator #(.V_OFFSET(V_OFFSET_UNDER)) u_under (
    .clk, .v_p(v_ref_l), .v_n(v_out), .q(q_under)
  );

  assign sense = '{over: q_over, under: q_under, cmp: q_cmp};

endmodule
