// fracn_pkg: constants shared by the fractional-N divider.
//
// The divider counts prescaler cycles with a pulse counter P (4 bits, 7..10)
// and a swallow counter S (3 bits, 0..6) behind a 7/8 dual-modulus
// prescaler, so one output cycle is 7*P + S prescaler cycles. A 20-bit
// third-order delta-sigma modulator dithers that integer. These widths and
// the prescaler modulus are the published ones; the 4-bit signed carrier of
// the modulator output (values -3..+4) and the 7-bit integer ratio are this
// design's choices.
package fracn_pkg;
  localparam int unsigned PRESCALER_N = 7;   // divide-by-N when MC = 1, N+1 when MC = 0
  localparam int unsigned P_BITS      = 4;   // pulse counter width
  localparam int unsigned S_BITS      = 3;   // swallow counter width
  localparam int unsigned DSM_BITS    = 20;  // modulator input accuracy k, M = 2**k
  localparam int unsigned DSM_Y_BITS  = 4;   // signed modulator output, -3..+4
  localparam int unsigned MINT_BITS   = 7;   // integer counter ratio 7*P + S
  localparam int unsigned CODE_BITS   = 6;   // channel control code
  localparam int unsigned NUM_CHANNELS = 31; // channel entries in the decoder

  typedef logic signed [DSM_Y_BITS-1:0] dsm_y_t;
endpackage
