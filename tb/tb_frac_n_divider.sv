// tb_frac_n_divider: end-to-end test of the fractional-N divider at its
// published sizes (20-bit modulator, 7/8 prescaler, 4-bit P, 3-bit S).
//
// f_in is a free-running clock; every f_div period is measured in f_in
// periods.
//  1. Integer mode (modulator off), channels 0, 4, 14, 15, 30 and the
//     unused code 63: every period must be 2*floor(f_IN/40 MHz), worked out
//     here from the channel frequency, and code_valid must match.
//  2. Fractional mode, channel 4 (868.3 MHz, f_IN = 2604.9 MHz): each period
//     must be 2*(65 + y[n]), with y[n] the output of a reference modulator
//     kept here, and the mean division over the run must be 130.245.
//  3. Fractional mode, channel 14 (924 MHz, f_IN = 2772 MHz): the mean
//     division must be 138.6, and here the pulse counter also reaches P = 10.
//     (P = 7 needs a sum of 55 or less, which the channel table reaches only
//     rarely; the pulse counter's own test covers it.)
// The testbench counts how often each mechanism happened and fails if one
// never did: prescaler divide-by-8 and divide-by-7 cycles, phase switches,
// pulse counts P = 8, 9 and 10, negative, zero and positive modulator
// offsets, integer-mode and fractional-mode cycles, and modulator resets.
module tb_frac_n_divider;
  logic       f_in = 1'b0, rst_n = 1'b1, dsm_rst_n = 1'b1, dsm_en = 1'b0;
  logic [5:0] ctrl_code = '0;
  logic       f_div, mc_test, dmp_test, code_valid;
  int checks = 0, failures = 0;

  frac_n_divider dut (.f_in, .rst_n, .dsm_rst_n, .dsm_en, .ctrl_code,
                      .f_div, .mc_test, .dmp_test, .code_valid);

  always #1 f_in = ~f_in;

  // drive reset low after time 0 so the asynchronous reset sees an edge
  initial #1 begin rst_n = 1'b0; dsm_rst_n = 1'b0; end

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- measurement -------------------------------------------------------
  int fin_count = 0;
  always @(posedge f_in) fin_count++;

  int n_div8 = 0, n_div7 = 0, n_switch = 0, n_dsm_reset = 0;
  int n_int_cycles = 0, n_frac_cycles = 0;
  int n_p [7:10];
  int n_yneg = 0, n_yzero = 0, n_ypos = 0;

  // prescaler modulus as sampled at each rising prescaler output edge
  always @(posedge dmp_test) if (rst_n) begin
    if (mc_test) n_div7++; else n_div8++;
  end
  always @(dut.u_dmp.sel) if (rst_n) n_switch++;
  always @(posedge f_div) if (rst_n) begin
    if (dut.p_val >= 7 && dut.p_val <= 10) n_p[dut.p_val]++;
  end

  int last_edge = 0;
  event period_done;
  int period;
  always @(posedge f_div) begin
    period = fin_count - last_edge;
    last_edge = fin_count;
    -> period_done;
  end

  task automatic next_period(output int p);
    @(period_done);
    p = period;
  endtask

  // ---- reference ---------------------------------------------------------
  function automatic real fc_mhz(int c);
    if (c < 4)       return 780.0 + 2.0 * c;
    else if (c == 4) return 868.3;
    else if (c < 15) return 906.0 + 2.0 * (c - 5);
    else             return 2405.0 + 5.0 * (c - 15);
  endfunction

  function automatic int int_ratio(int c);
    real fin = (c < 15) ? 3.0 * fc_mhz(c) : fc_mhz(c);
    return int'($floor(fin / 40.0 + 1e-9));
  endfunction

  class mash_ref;
    longint unsigned a1, a2, a3;
    int c2p, c3p, c3pp;
    function new(); a1 = 0; a2 = 0; a3 = 0; c2p = 0; c3p = 0; c3pp = 0; endfunction
    function int step(longint unsigned k);
      longint unsigned m = 64'd1 << 20;
      int c1, c2, c3, y;
      a1 = a1 + k;       c1 = int'(a1 >= m); a1 = a1 % m;
      a2 = a2 + a1 + c1; c2 = int'(a2 >= m); a2 = a2 % m;
      a3 = a3 + a2 + c2; c3 = int'(a3 >= m); a3 = a3 % m;
      y = c1 + (c2 - c2p) + (c3 - 2 * c3p + c3pp);
      c2p = c2; c3pp = c3p; c3p = c3;
      return y;
    endfunction
  endclass

  localparam int NFRAC = 3000;
  int ymeas [NFRAC];
  int yref  [NFRAC + 8];

  task automatic integer_mode(input int c);
    int p, want, bad = 0;
    int ch = (c < 31) ? c : 0;
    ctrl_code = 6'(c);
    want = 2 * int_ratio(ch);
    repeat (3) next_period(p);            // settle: counters take the new P, S at reload
    for (int n = 0; n < 25; n++) begin
      next_period(p);
      if (p != want) bad++;
      n_int_cycles++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL integer mode code %0d: %0d periods not %0d", c, bad, want); end
    checks++;
    if (code_valid != (c < 31)) begin failures++; $display("FAIL code_valid for code %0d", c); end
  endtask

  task automatic start_dsm(input int c);
    int p;
    ctrl_code = 6'(c);
    @(negedge f_div);
    dsm_rst_n = 1'b0;
    dsm_en    = 1'b1;
    n_dsm_reset++;
    #7 dsm_rst_n = 1'b1;
    repeat (2) next_period(p);
  endtask

  initial begin
    int p, best, bad;
    longint sum;
    real drift;
    mash_ref r;
    foreach (n_p[v]) n_p[v] = 0;

    #20 rst_n = 1'b1;
    #20 dsm_rst_n = 1'b1;

    // 1. integer mode
    foreach (int_codes[i]) integer_mode(int_codes[i]);

    // 2. fractional mode, 868.3 MHz channel
    start_dsm(4);
    r = new();
    for (int n = 0; n < NFRAC + 8; n++) yref[n] = r.step(128451);
    sum = 0;
    for (int n = 0; n < NFRAC; n++) begin
      next_period(p);
      checks++;
      if (p % 2 != 0) begin failures++; $display("FAIL odd period %0d", p); end
      ymeas[n] = p / 2 - 65;
      sum += p;
      if (ymeas[n] < 0) n_yneg++; else if (ymeas[n] == 0) n_yzero++; else n_ypos++;
      n_frac_cycles++;
    end
    // the modulator sequence seen at the output, allowing for a few cycles of start-up offset
    best = -1;
    for (int a = 4; a >= 0; a--) begin
      bad = 0;
      for (int n = 8; n < NFRAC - 8; n++) if (ymeas[n] != yref[n - a]) bad++;
      if (bad == 0) best = a;
    end
    checks++;
    if (best < 0) begin failures++; $display("FAIL fractional periods do not follow the modulator sequence"); end
    drift = real'(sum) - NFRAC * 130.245;
    checks++;
    if (drift > 16.0 || drift < -16.0) begin
      failures++;
      $display("FAIL mean division %f, want 130.245", real'(sum) / NFRAC);
    end
    $display("channel 4: mean division %f over %0d cycles", real'(sum) / NFRAC, NFRAC);

    // 3. fractional mode, 924 MHz channel 14 (ratio 138.6, P reaches 10)
    start_dsm(14);
    sum = 0;
    for (int n = 0; n < 2000; n++) begin
      next_period(p);
      sum += p;
      n_frac_cycles++;
    end
    drift = real'(sum) - 2000 * 138.6;
    checks++;
    if (drift > 16.0 || drift < -16.0) begin
      failures++;
      $display("FAIL mean division %f, want 138.6", real'(sum) / 2000);
    end
    $display("channel 14: mean division %f over 2000 cycles", real'(sum) / 2000);

    // mechanism coverage
    $display("div8 %0d div7 %0d switches %0d P8 %0d P9 %0d P10 %0d y<0 %0d y=0 %0d y>0 %0d int %0d frac %0d dsm resets %0d",
             n_div8, n_div7, n_switch, n_p[8], n_p[9], n_p[10], n_yneg, n_yzero, n_ypos,
             n_int_cycles, n_frac_cycles, n_dsm_reset);
    cover_check(n_div8, "prescaler divide-by-8");
    cover_check(n_div7, "prescaler divide-by-7");
    cover_check(n_switch, "phase switch");
    cover_check(n_p[8], "P = 8");
    cover_check(n_p[9], "P = 9");
    cover_check(n_p[10], "P = 10");
    cover_check(n_yneg, "negative modulator offset");
    cover_check(n_yzero, "zero modulator offset");
    cover_check(n_ypos, "positive modulator offset");
    cover_check(n_int_cycles, "integer mode");
    cover_check(n_frac_cycles, "fractional mode");
    cover_check(n_dsm_reset, "modulator reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int int_codes [6] = '{0, 4, 14, 15, 30, 63};

  task automatic cover_check(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL never happened: %s", what); end
  endtask
endmodule
