// phase_select: one-hot 4:1 phase selector of the phase-switching prescaler.
//
// Four 90-degree-spaced phases p[0..3] (I+, Q+, I-, Q-) arrive from the
// half-speed divider; exactly one of the select lines sel[0..3] (S1..S4)
// is high and its phase is passed to Y. The published circuit uses one
// low-threshold transmission gate per phase on a shared output node; this
// model is the logic equivalent, an AND-OR selector. Purely combinational.
module phase_select (
  input  logic [3:0] p,
  input  logic [3:0] sel,
  output logic       y
);
  always_comb y = |(p & sel);
endmodule
