// mash111_modified: third-order modified MASH 1-1-1 delta-sigma modulator.
//
// Three error-feedback accumulators of K_BITS bits each are cascaded. In the
// classic MASH 1-1-1 each stage integrates only the residue (quantisation
// error) of the stage before it. In this modified form each later stage
// integrates the residue plus the carry (one-bit output) of the stage
// before it. The extra carry path leaves the third-order noise shaping
// (1 - z^-1)^3 in place and makes the output sequence much longer: with
// M = 2**K_BITS it repeats after between 2*M^2 and M^3 clocks instead of
// between 2 and M, which spreads the quantisation noise and removes
// fractional spurs.
//
// The carries c1, c2, c3 are combined by the usual MASH network:
//   t = c2 + (c3 - c3[n-1]),   y = c1 + (t - t[n-1])
// so y is in -3..+4 and its long-term mean is k_in / M.
//
// Timing: one step per rising clk edge (the divider output f_DIV). The
// result of a step is registered, so y is stable for a whole clock period
// and the step that consumes k_in at edge n shows at y after edge n. While
// en is 0 the modulator is cleared and y is 0 (integer division); rst_n
// (asynchronous, active low) clears it as well. The registered output and
// the enable are this design's choices. K_BITS = 20 is the published width.
module mash111_modified
  import fracn_pkg::*;
#(
  parameter int unsigned K_BITS = DSM_BITS
) (
  input  logic              clk,     // f_DIV
  input  logic              rst_n,   // modulator reset
  input  logic              en,
  input  logic [K_BITS-1:0] k_in,
  output dsm_y_t            y
);
  typedef logic signed [DSM_Y_BITS-1:0] sy_t;

  logic [K_BITS-1:0] s1, s2, s3;           // accumulator residues
  logic              c3_prev;
  sy_t               t_prev;

  logic [K_BITS:0]   a1, a2, a3;
  logic              c1, c2, c3;
  sy_t               t, y_next;

  always_comb begin
    a1 = {1'b0, s1} + {1'b0, k_in};
    c1 = a1[K_BITS];
    a2 = {1'b0, s2} + {1'b0, a1[K_BITS-1:0]} + (K_BITS+1)'(c1);
    c2 = a2[K_BITS];
    a3 = {1'b0, s3} + {1'b0, a2[K_BITS-1:0]} + (K_BITS+1)'(c2);
    c3 = a3[K_BITS];
    t      = sy_t'(c2) + sy_t'(c3) - sy_t'(c3_prev);
    y_next = sy_t'(c1) + t - t_prev;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
      c3_prev <= 1'b0;
      t_prev  <= '0;
      y       <= '0;
    end else if (!en) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
      c3_prev <= 1'b0;
      t_prev  <= '0;
      y       <= '0;
    end else begin
      s1 <= a1[K_BITS-1:0];
      s2 <= a2[K_BITS-1:0];
      s3 <= a3[K_BITS-1:0];
      c3_prev <= c3;
      t_prev  <= t;
      y       <= y_next;
    end
  end
endmodule
