// tb_pulse_counter: checks the programmable pulse counter.
//
// p_in is changed to a random value 7..10 at random clock edges. The value
// present at the edge where en is high is the length of the next cycle;
// the testbench checks that the next en comes exactly that many clock
// edges later, and that f_div rises once per cycle and is high for P-4
// ticks of it.
module tb_pulse_counter;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [3:0] p_in = 4'd9;
  logic en, f_div;
  int checks = 0, failures = 0;
  int seen_p [7:10];

  pulse_counter dut (.clk, .rst_n, .p_in, .en, .f_div);

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

  // change p_in at random times away from clock edges
  always @(negedge clk) if ($urandom_range(0, 2) == 0) p_in <= 4'($urandom_range(7, 10));

  // Monitor: signals read in the edge's own event are their values before it.
  int want = 0, ticks = 0, high = 0, cycles = 0;
  bit started = 1'b0;
  always @(posedge clk) if (rst_n) begin
    ticks++;
    if (f_div) high++;
    if (en) begin
      if (started) begin
        checks++;
        if (ticks != want) begin failures++; $display("FAIL cycle %0d: %0d ticks, want %0d", cycles, ticks, want); end
        checks++;
        if (high != want - 4) begin failures++; $display("FAIL cycle %0d: f_div high %0d ticks, want %0d", cycles, high, want - 4); end
        seen_p[want]++;
        cycles++;
      end
      started = 1'b1;
      want = int'(p_in);
      ticks = 0; high = 0;
    end
  end

  initial begin
    foreach (seen_p[v]) seen_p[v] = 0;
    #12 rst_n = 1'b1;
    wait (cycles == 400);
    foreach (seen_p[v]) begin
      checks++;
      if (seen_p[v] == 0) begin failures++; $display("FAIL P=%0d never used", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
