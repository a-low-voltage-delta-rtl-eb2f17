// tb_dual_modulus_prescaler: checks the 7/8 prescaler cycle by cycle.
//
// f_in runs freely. The driver changes MC only on falling edges of f_out
// (as the swallow counter does): MC = 0 for 100 cycles, then 1 for 100,
// then random. The monitor measures every f_out period in f_in periods: it
// must be 8 when MC was 0 and 7 when MC was 1 at the rising f_out edge that
// started it. The phase-select output Y must rise exactly twice per f_out
// period (no glitch from phase switching).
module tb_dual_modulus_prescaler;
  logic f_in = 1'b0, rst_n = 1'b1, mc = 1'b0;
  logic f_out, y;
  int checks = 0, failures = 0;
  int fin_count = 0, y_rises = 0;
  int n7 = 0, n8 = 0, ncycles = 0;

  dual_modulus_prescaler dut (.f_in, .rst_n, .mc, .f_out, .y);

  always #5 f_in = ~f_in;
  always @(posedge f_in) fin_count++;
  always @(posedge y)    y_rises++;

  // drive reset low after time 0 so the asynchronous reset sees an edge
  initial #1 rst_n = 1'b0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver
  initial begin
    #12 rst_n = 1'b1;
    forever begin
      @(negedge f_out);
      if (ncycles < 100)      mc = 1'b0;
      else if (ncycles < 200) mc = 1'b1;
      else                    mc = 1'($urandom_range(0, 1));
    end
  end

  // monitor
  initial begin
    int start, yr;
    logic mc_at_edge;
    @(posedge rst_n);
    @(posedge f_out);
    #1;
    start = fin_count; yr = y_rises; mc_at_edge = mc;
    while (ncycles < 600) begin
      @(posedge f_out);
      #1;
      checks++;
      if (fin_count - start != (mc_at_edge ? 7 : 8)) begin
        failures++;
        $display("FAIL cycle %0d: %0d f_in periods, mc=%b", ncycles, fin_count - start, mc_at_edge);
      end
      checks++;
      if (y_rises - yr != 2) begin
        failures++;
        $display("FAIL cycle %0d: %0d rising edges of Y", ncycles, y_rises - yr);
      end
      if (mc_at_edge) n7++; else n8++;
      ncycles++;
      start = fin_count; yr = y_rises; mc_at_edge = mc;
    end
    checks++;
    if (n7 == 0 || n8 == 0) begin failures++; $display("FAIL a modulus never used"); end
    $display("divide-by-7 cycles %0d, divide-by-8 cycles %0d", n7, n8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
