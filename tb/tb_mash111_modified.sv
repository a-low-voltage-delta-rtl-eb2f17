// tb_mash111_modified: checks the modified MASH 1-1-1 modulator.
//
// A 4-bit instance (M = 16) is run for several inputs K and compared clock
// by clock with a reference model kept here, which writes the output as
// y = c1 + (c2 - c2[n-1]) + (c3 - 2 c3[n-1] + c3[n-2]). On the 4-bit
// instance the testbench also checks the claims on sequence length: the
// steady output repeats after exactly M^3 = 4096 clocks for odd K and after
// 2*M^2 = 512 clocks, the shortest, for K = M/2; over one period the
// output sums to exactly K*period/M; outputs stay in -3..+4. A 20-bit
// instance (the published width) runs the 868.3 MHz channel input
// K = 128451 and must match the reference and keep its running sum within 4
// of n*K/2^20. Clearing enable must return the output to 0.
module tb_mash111_modified;
  import fracn_pkg::*;
  localparam int KB_S = 4;
  localparam int M_S  = 1 << KB_S;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [KB_S-1:0] k4 = '0;
  logic [19:0]     k20 = '0;
  dsm_y_t y4, y20;
  int checks = 0, failures = 0;
  int ymin = 0, ymax = 0;

  mash111_modified #(.K_BITS(KB_S)) dut4  (.clk, .rst_n, .en, .k_in(k4),  .y(y4));
  mash111_modified                  dut20 (.clk, .rst_n, .en, .k_in(k20), .y(y20));

  always #5 clk = ~clk;

  // drive reset low after time 0 so the asynchronous reset sees an edge
  initial #1 rst_n = 1'b0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model state, one set per width.
  class mash_ref;
    int kb;
    longint unsigned a1, a2, a3;
    int c2p, c3p, c3pp;
    function new(int kb_); kb = kb_; clear(); endfunction
    function void clear(); a1 = 0; a2 = 0; a3 = 0; c2p = 0; c3p = 0; c3pp = 0; endfunction
    function int step(longint unsigned k);
      longint unsigned m = 64'd1 << kb;
      int c1, c2, c3, y;
      a1 = a1 + k;       c1 = int'(a1 >= m); a1 = a1 % m;
      a2 = a2 + a1 + c1; c2 = int'(a2 >= m); a2 = a2 % m;
      a3 = a3 + a2 + c2; c3 = int'(a3 >= m); a3 = a3 % m;
      y = c1 + (c2 - c2p) + (c3 - 2 * c3p + c3pp);
      c2p = c2; c3pp = c3p; c3p = c3;
      return y;
    endfunction
  endclass

  int ys [0:9999];

  task automatic run_small(input int k, input int want_period);
    mash_ref r = new(KB_S);
    int n0 = 200, sum = 0, bad = 0;
    bit shorter = 1'b1;
    en = 1'b0; k4 = KB_S'(k);
    @(posedge clk); #1;
    checks++;
    if (y4 != 0) begin failures++; $display("FAIL output not cleared by enable"); end
    en = 1'b1;
    for (int n = 0; n < n0 + 2 * want_period + 8; n++) begin
      int yr;
      @(posedge clk); #1;
      yr = r.step(k);
      ys[n] = int'(y4);
      if (int'(y4) != yr) bad++;
      if (ys[n] < ymin) ymin = ys[n];
      if (ys[n] > ymax) ymax = ys[n];
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL K=%0d: %0d outputs differ from reference", k, bad); end
    // period: repeats after want_period, not after half of it
    bad = 0;
    for (int n = n0; n < n0 + want_period; n++) begin
      if (ys[n] != ys[n + want_period]) bad++;
      if (ys[n] != ys[n + want_period / 2]) shorter = 1'b0;
      sum += ys[n];
    end
    checks++;
    if (bad != 0 || shorter) begin
      failures++;
      $display("FAIL K=%0d: sequence does not have period %0d", k, want_period);
    end
    checks++;
    if (sum * M_S != k * want_period) begin
      failures++;
      $display("FAIL K=%0d: period sum %0d, want %0d/%0d", k, sum, k * want_period, M_S);
    end
  endtask

  initial begin
    mash_ref r20 = new(20);
    longint sum20 = 0;
    int bad = 0;
    #12 rst_n = 1'b1;
    run_small(1,  M_S * M_S * M_S);
    run_small(8,  2 * M_S * M_S);
    run_small(4,  M_S * M_S * M_S / 4);
    run_small(15, M_S * M_S * M_S);
    run_small(5,  M_S * M_S * M_S);
    checks++;
    if (ymin != -3 || ymax != 4) begin failures++; $display("FAIL output range %0d..%0d", ymin, ymax); end

    // published width, 868.3 MHz channel fraction
    en = 1'b0; k20 = 20'd128451;
    @(posedge clk); #1;
    en = 1'b1;
    for (int n = 1; n <= 5000; n++) begin
      int yr;
      real drift;
      @(posedge clk); #1;
      yr = r20.step(128451);
      if (int'(y20) != yr) bad++;
      sum20 += int'(y20);
      drift = real'(sum20) - real'(n) * 128451.0 / 1048576.0;
      if (drift > 4.0 || drift < -4.0) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL 20-bit run: %0d mismatches or drift", bad); end

    // reset clears
    rst_n = 1'b0; #1;
    checks++;
    if (y20 != 0 || y4 != 0) begin failures++; $display("FAIL reset does not clear output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
