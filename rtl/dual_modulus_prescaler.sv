// dual_modulus_prescaler: 7/8 phase-switching dual-modulus prescaler.
//
// A full-speed divide-by-two halves f_in; a half-speed divide-by-two turns
// that into four 90-degree-spaced phases at f_in/4 (I+, Q+, I-, Q-). A
// one-hot phase selector passes one of them to Y, and an asynchronous
// divide-by-two clocked by Y gives f_out = f_in/8. While MC is 1, every
// rising edge of f_out (through an AND gate with MC) moves the selection to
// the phase leading by 90 degrees, which is one f_in period earlier: that
// output cycle lasts 7 f_in periods instead of 8.
//
//   mc = 0 : f_out period = 8 f_in periods
//   mc = 1 : f_out period = 7 f_in periods
//
// mc is sampled at the rising edge of f_out and sets the length of the
// cycle that starts there; it must be stable while f_out is high, which is
// why the counters that drive it are clocked on the falling edge of f_out.
// The bias and buffer stages of the published circuit (analog, no logic
// function) are left out, so the buffered Y (YT) is Y itself.
module dual_modulus_prescaler (
  input  logic f_in,
  input  logic rst_n,
  input  logic mc,
  output logic f_out,
  output logic y
);
  logic       f_half;          // f_in/2 from the full-speed divider
  logic       f_half_q;        // unused quadrature output of the full-speed divider
  logic       ph_i, ph_q;      // f_in/4 in quadrature
  logic [3:0] phases;          // p0..p3 = I+, Q+, I-, Q-
  logic [3:0] sel;
  logic       f_out_i;         // unused master output of the output divider
  logic       pc_clk;

  div2_scl u_div_full (.clk(f_in),   .rst_n, .i(f_half), .q(f_half_q));
  div2_scl u_div_half (.clk(f_half), .rst_n, .i(ph_i),   .q(ph_q));

  assign phases = {~ph_q, ~ph_i, ph_q, ph_i};

  phase_select  u_sel  (.p(phases), .sel, .y);
  div2_scl      u_div_out (.clk(y), .rst_n, .i(f_out_i), .q(f_out));

  assign pc_clk = f_out & mc;
  phase_control u_ctrl (.clk(pc_clk), .rst_n, .sel);
endmodule
