// Behavioural model of the clocked comparator (sense-amplifier flip-flop).
//
// The circuit is a sense-amplifier stage followed by an SR latch.  While the
// clock is low both internal nodes S and R are held low and the latch keeps
// its state; at the rising clock edge the amplifier resolves the sign of
// (v_p - v_n), raises one of S and R, and the latch takes the new decision.
// The decision is therefore a flip-flop output: it changes only just after a
// rising edge and is used by the digital logic during the following cycle.
//
// This file is a behavioural model (analog circuit, not synthesizable logic):
// the input voltages are real numbers in volts.  The model decides
// q = 1 when v_p - v_n > V_OFFSET and q = 0 otherwise.  V_OFFSET stands for
// the input-referred offset caused by device mismatch (about 5.3 mV standard
// deviation at a 220 mV common mode in the published Monte Carlo run); it is
// 0 by default.  Resolution time, metastability and the minimum supply are
// not modelled.
//
// Ports
//   clk      : sampling clock, decision taken on the rising edge
//   v_p, v_n : non-inverting and inverting inputs [V]
//   q        : latched decision
module sa_comparator #(
  parameter real V_OFFSET = 0.0
) (
  input  logic clk,
  input  real  v_p,
  input  real  v_n,
  output logic q
);

  always_ff @(posedge clk) begin
    q <= (v_p - v_n) > V_OFFSET;
  end

endmodule
