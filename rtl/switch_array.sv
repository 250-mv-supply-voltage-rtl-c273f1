// Behavioural model of the binary-weighted PMOS switch array.
//
// The on-switch number N[8:1] drives eight PMOS switches M1..M8 whose widths
// are 1, 2, 4 ... 128 unit switches, so bit i of N turns on 2**i units and
// the array carries N units' worth of current from V_IN to V_OUT.  Eight
// weighted devices replace 256 equal ones and keep the array small.  The
// N-well of all switches is held at V_BIAS by the switch bias circuit.
//
// Current model (all switches in subthreshold, the intended operating
// region, 0.2 V .. 0.35 V supply):
//   I_SUPPLY = sum_i N[i] * 2**i * I_unit
//   I_unit   = I_max(V_IN, V_FB) / (2**N_BITS - 1) * g(V_IN - V_OUT) / g(V_DROP_REF)
//   g(v)     = 1 - exp(-v / V_T), the subthreshold drain-voltage law
//   I_max    rises exponentially with V_IN, fitted through the printed
//            full-array currents at a 50 mV drop: 630 uA at 0.25 V and
//            1.78 mA at 0.30 V with forward bias, 204 uA and 0.65 mA without;
//            for 0 < V_FB < V_FB_NOM the two fits are blended linearly.
// For small drops g is proportional to the drop, as the unit current of the
// published design is described; for drops of a few V_T it flattens, which
// lets the array still carry 1 mA at a 20 mV drop from a 0.30 V supply (a
// published operating point) where a purely linear law would not.  The drain
// law, the exponential fit in V_IN and the blend are this model's own
// choices.  No current flows when V_OUT >= V_IN.
//
// This file is a behavioural model (analog power devices), not synthesizable
// logic.  It has no clock: the current follows N at once.
//
// Ports
//   n_on     : on-switch number N
//   v_in     : supply [V]
//   v_out    : regulator output [V]
//   v_bias   : N-well bias [V]
//   i_supply : current delivered into V_OUT [A]
module switch_array #(
  parameter int unsigned N_BITS     = 8,
  parameter real         I_FB_250   = 630.0e-6,
  parameter real         I_FB_300   = 1.78e-3,
  parameter real         I_NFB_250  = 204.0e-6,
  parameter real         I_NFB_300  = 0.65e-3,
  parameter real         V_DROP_REF = 0.05,
  parameter real         V_T        = 0.0259,
  parameter real         V_FB_NOM   = 0.224
) (
  input  logic [N_BITS-1:0] n_on,
  input  real               v_in,
  input  real               v_out,
  input  real               v_bias,
  output real               i_supply
);

  real i_max_fb, i_max_nfb, blend, i_max, i_unit;

  always_comb begin
    // Exponential fits through the 0.25 V and 0.30 V points.
    i_max_fb  = I_FB_250  * $exp($ln(I_FB_300  / I_FB_250)  * (v_in - 0.25) / 0.05);
    i_max_nfb = I_NFB_250 * $exp($ln(I_NFB_300 / I_NFB_250) * (v_in - 0.25) / 0.05);
    blend = (v_in - v_bias) / V_FB_NOM;
    if (blend < 0.0) blend = 0.0;
    if (blend > 1.0) blend = 1.0;
    i_max  = i_max_nfb + (i_max_fb - i_max_nfb) * blend;
    i_unit = (v_in > v_out)
           ? i_max / real'((1 << N_BITS) - 1)
             * (1.0 - $exp(-(v_in - v_out) / V_T)) / (1.0 - $exp(-V_DROP_REF / V_T))
           : 0.0;
    // Sum of the binary-weighted switches that are on.
    i_supply = 0.0;
    for (int i = 0; i < N_BITS; i++) begin
      if (n_on[i]) i_supply = i_supply + real'(1 << i) * i_unit;
    end
  end

endmodule
