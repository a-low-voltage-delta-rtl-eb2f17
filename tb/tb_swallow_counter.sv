// tb_swallow_counter: checks the swallow counter and MC.
//
// The testbench plays the pulse counter: it raises load for one tick every
// P ticks (P random 7..10) with a random s_in 0..6. Between two loads MC
// must be 0 for exactly S ticks, all at the start of the cycle, and 1 for
// the remaining P - S ticks.
module tb_swallow_counter;
  logic clk = 1'b0, rst_n = 1'b1;
  logic load = 1'b0;
  logic [2:0] s_in = '0;
  logic mc;
  int checks = 0, failures = 0;
  int seen_s [0:6];

  swallow_counter dut (.clk, .rst_n, .load, .s_in, .mc);

  always #5 clk = ~clk;

  // drive reset low after time 0 so the asynchronous reset sees an edge
  initial #1 rst_n = 1'b0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, s, zeros;
    bit order_ok;
    foreach (seen_s[v]) seen_s[v] = 0;
    #12 rst_n = 1'b1;
    for (int c = 0; c < 300; c++) begin
      p = $urandom_range(7, 10);
      s = $urandom_range(0, 6);
      @(negedge clk);
      load = 1'b1; s_in = 3'(s);
      @(negedge clk);
      load = 1'b0; s_in = 3'($urandom_range(0, 7));   // ignored while load is low
      zeros = 0; order_ok = 1'b1;
      for (int t = 0; t < p; t++) begin
        if (!mc) begin
          zeros++;
          if (t >= s) order_ok = 1'b0;
        end
        if (t < p - 1) @(negedge clk);
      end
      checks++;
      if (zeros != s || !order_ok) begin
        failures++;
        $display("FAIL cycle %0d: S=%0d P=%0d, MC low for %0d ticks", c, s, p, zeros);
      end
      seen_s[s]++;
    end
    foreach (seen_s[v]) begin
      checks++;
      if (seen_s[v] == 0) begin failures++; $display("FAIL S=%0d never used", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
