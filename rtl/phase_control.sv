// phase_control: ring of four D flip-flops that steps the phase selection.
//
// The ring holds a one-hot word sel = {S4,S3,S2,S1}. It is clocked by
// f_out AND MC, so it moves only at rising prescaler-output edges while the
// modulus control asks for the short division. Each step hands the
// selection to the phase that leads the current one by 90 degrees. With the
// phase order p0 = I+, p1 = Q+, p2 = I-, p3 = Q- (each lags the one before
// it), the leading phase of p[j] is p[j-1], so the ring rotates S1 -> S4 ->
// S3 -> S2 -> S1. This forward switching shortens the cycle and cannot
// glitch, since the newly selected phase is already high when the switch
// happens. Reset (active low, asynchronous) selects p0; the reset value is
// this design's choice.
module phase_control (
  input  logic       clk,    // f_out AND MC
  input  logic       rst_n,
  output logic [3:0] sel     // one-hot, bit j selects p[j]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel <= 4'b0001;
    else        sel <= {sel[0], sel[3:1]};   // select p[j-1] (mod 4)
  end

  // The selected transmission gates share one node: exactly one may be on.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot(sel))
    else $error("phase_control: selection not one-hot: %b", sel);
endmodule
