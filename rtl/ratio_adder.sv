// ratio_adder: adds the modulator output to the integer ratio and splits the
// sum into the pulse and swallow counts.
//
// The decoder gives the integer counter ratio m_int and the delta-sigma
// modulator a small signed offset y (-3..+4). Their sum R is the number of
// prescaler input periods wanted in the next output cycle, and with a 7/8
// prescaler R = 7*P + S, so P = R div 7 and S = R mod 7 (0..6). For R in
// 49..76 this gives P = 7..10. The split by 7 is this design's choice; the
// published block diagram shows only one adder feeding both counters.
// Purely combinational.
module ratio_adder
  import fracn_pkg::*;
#(
  parameter int unsigned MW = MINT_BITS
) (
  input  logic [MW-1:0]     m_int,
  input  dsm_y_t            dsm_y,
  output logic [P_BITS-1:0] p,
  output logic [S_BITS-1:0] s
);
  localparam logic [MW:0] N = (MW+1)'(PRESCALER_N);

  logic [MW:0] sum;     // one bit wider: m_int + y never wraps for m_int >= 3
  logic [MW:0] quo;
  logic [MW:0] rem;

  always_comb begin
    sum = {1'b0, m_int} + {{(MW+1-DSM_Y_BITS){dsm_y[DSM_Y_BITS-1]}}, dsm_y};
    quo = sum / N;
    rem = sum % N;
    p   = quo[P_BITS-1:0];
    s   = rem[S_BITS-1:0];
  end
endmodule
