// pulse_counter: programmable pulse counter P of the pulse-swallow divider.
//
// Counts prescaler output cycles (rising edges of f_PRE, the inverted
// prescaler output). The count runs from P-1 down to 0, so one divider
// output cycle lasts P prescaler cycles; P is 7..10 in use. While the count
// is 0 the en output is high: at that edge the counter reloads p_in and the
// swallow counter reloads its own value, starting a new cycle. p_in is
// sampled only at the reload edge, so it may change at any other time.
//
// f_div, the divider output, is registered and high while the count is 4
// or more: it rises at the edge that starts a cycle and is high for P-4 of
// its P ticks. This duty cycle is this design's choice. Reset (asynchronous,
// active low) starts a cycle at the first edge.
module pulse_counter
  import fracn_pkg::*;
#(
  parameter int unsigned PW = P_BITS
) (
  input  logic          clk,     // f_PRE
  input  logic          rst_n,
  input  logic [PW-1:0] p_in,    // modulus P, >= 5
  output logic          en,      // last tick of the cycle: reload
  output logic          f_div
);
  localparam logic [PW-1:0] HIGH_FROM = PW'(4);

  logic [PW-1:0] cnt, cnt_next;

  always_comb begin
    en       = (cnt == '0);
    cnt_next = en ? p_in - PW'(1) : cnt - PW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      f_div <= 1'b0;
    end else begin
      cnt   <= cnt_next;
      f_div <= (cnt_next >= HIGH_FROM);
    end
  end
endmodule
