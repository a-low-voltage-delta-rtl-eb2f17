// swallow_counter: programmable swallow counter S and modulus control MC.
//
// At the edge where the pulse counter ends a cycle (load = 1) the counter
// takes s_in (0..6); at each later f_PRE edge it counts down to 0 and stays
// there. MC is 0 while the count is not 0 and 1 once it is, so in every
// output cycle of P prescaler cycles the prescaler divides by 8 (MC = 0)
// for S cycles and by 7 (MC = 1) for the other P - S: 7*P + S prescaler
// input periods in all. S must be less than P.
//
// MC is a registered output of the count and changes only at rising f_PRE
// edges, i.e. falling prescaler-output edges; the prescaler samples it at
// its next rising output edge, so each counter state sets the modulus of
// exactly one prescaler cycle. Reset (asynchronous, active low) clears the
// count.
module swallow_counter
  import fracn_pkg::*;
#(
  parameter int unsigned SW = S_BITS
) (
  input  logic          clk,     // f_PRE
  input  logic          rst_n,
  input  logic          load,    // En from the pulse counter
  input  logic [SW-1:0] s_in,
  output logic          mc
);
  logic [SW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (load)       cnt <= s_in;
    else if (cnt != '0)  cnt <= cnt - SW'(1);
  end

  assign mc = (cnt == '0);
endmodule
