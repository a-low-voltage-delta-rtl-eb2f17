// div2_scl: master-slave divide-by-two with quadrature outputs.
//
// Two latches in a loop, the first reading the inverted output of the
// second, divide the clock by two. The master latch (transparent while clk
// is low) gives I, the slave (transparent while clk is high) gives Q, so Q
// follows I half an input period later: I and Q are 90 degrees apart at the
// output frequency, and together with their complements they form the four
// phases I+, Q+, I-, Q- used by the phase-switching prescaler.
//
// The published circuit is a pair of source-coupled-logic latches. Here each
// latch is written as its edge-triggered equivalent: I takes not(Q) at the
// falling clock edge and Q takes I at the rising edge. The asynchronous
// active-low reset (both outputs to 0) is this design's addition, so that a
// simulation starts from a known state.
//
// Ports: clk in, rst_n in, i out (master), q out (slave). Both outputs run at
// clk/2 with 50 % duty; q changes on rising clk edges, i on falling ones.
module div2_scl (
  input  logic clk,
  input  logic rst_n,
  output logic i,
  output logic q
);
  // Master latch: follows not(Q) while clk is low.
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) i <= 1'b0;
    else        i <= ~q;
  end

  // Slave latch: follows I while clk is high.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= i;
  end
endmodule
