// Behavioural model of the switch bias circuit.
//
// The PMOS power switches share an N-well whose voltage V_BIAS is pulled
// below the supply V_IN, so the source-to-well junction is forward biased by
// V_FB = V_IN - V_BIAS.  At a 250 mV supply the switches run in subthreshold
// and the forward body bias raises their drive about threefold, which lets
// the switch array shrink to a third.  The circuit itself is a PMOS device
// feeding a resistor string to ground, with the well tap between them; its
// sizes are not published, so this model reproduces the transfer curve
// instead of the devices:
//   - up to V_IN = V_KNEE (250 mV) the bias is a fixed fraction of V_IN,
//     chosen so that V_BIAS = 26 mV (V_FB = 224 mV) at 250 mV;
//   - above the knee V_FB grows linearly from 224 mV to V_FB_MAX (280 mV)
//     at V_IN = V_IN_MAX (1.2 V), staying far below the ~0.7 V junction
//     turn-on voltage over the whole 0.25 V .. 1.2 V range.
// The 26 mV / 224 mV point is the simulated one; the published measurement
// shows a somewhat larger forward bias (250 mV at 0.25 V, 268 mV at 0.3 V)
// and is not what this model follows.  The linear segment above the knee is
// this model's own choice.
//
// This file is a behavioural model (analog), not synthesizable logic.
//
// Ports
//   v_in   : supply voltage [V]
//   v_bias : N-well bias voltage of the switch array [V]
module switch_bias #(
  parameter real V_KNEE    = 0.25,
  parameter real V_FB_KNEE = 0.224,
  parameter real V_IN_MAX  = 1.2,
  parameter real V_FB_MAX  = 0.280
) (
  input  real v_in,
  output real v_bias
);

  real v_fb;

  always_comb begin
    if (v_in <= 0.0)
      v_fb = 0.0;
    else if (v_in <= V_KNEE)
      v_fb = v_in * (V_FB_KNEE / V_KNEE);
    else
      v_fb = V_FB_KNEE + (V_FB_MAX - V_FB_KNEE) * (v_in - V_KNEE) / (V_IN_MAX - V_KNEE);
    v_bias = v_in - v_fb;
  end

endmodule
