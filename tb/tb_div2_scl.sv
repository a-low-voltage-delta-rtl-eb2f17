// tb_div2_scl: checks the master-slave divide-by-two.
//
// After reset the clock runs for 200 periods. Right after every rising edge
// the slave output Q must have toggled and equal the master output I; right
// after every falling edge I must have toggled and differ from Q. Together
// these give f/2 outputs with I leading Q by a quarter of the output period.
module tb_div2_scl;
  logic clk = 1'b0, rst_n = 1'b1;
  logic i, q;
  int checks = 0, failures = 0;

  div2_scl dut (.clk, .rst_n, .i, .q);

  always #5 clk = ~clk;

  // drive reset low after time 0 so the asynchronous reset sees an edge
  initial #1 rst_n = 1'b0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t: i=%b q=%b", what, $time, i, q); end
  endtask

  initial begin
    logic pi, pq;
    #23 rst_n = 1'b1;
    check(i == 1'b0 && q == 1'b0, "reset value");
    @(negedge clk); #1;
    pi = i; pq = q;
    repeat (200) begin
      @(posedge clk); #1;
      check(q != pq, "q toggles on rising edge");
      check(i == pi, "i holds on rising edge");
      check(q == i,  "q follows i");
      pq = q;
      @(negedge clk); #1;
      check(i != pi, "i toggles on falling edge");
      check(q == pq, "q holds on falling edge");
      check(i != q,  "i is not(q) after falling edge");
      pi = i;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
