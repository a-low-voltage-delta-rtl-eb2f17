// tb_channel_sweep: every channel of the 780/868/915 MHz and 2.4 GHz bands
// in fractional mode, at the published sizes.
//
// For each of the 31 channel codes the modulator is reset and enabled, and
// 400 output periods are measured in f_in periods. Every period must lie
// within 2*(m_int-3) .. 2*(m_int+4), and their sum must be within 16 f_in
// periods of 400 times the exact ratio f_IN / 20 MHz worked out here from
// the channel frequency. The f_in clock is not set to the channel frequency
// (the divider is purely edge-driven); only the ratio matters.
module tb_channel_sweep;
  logic       f_in = 1'b0, rst_n = 1'b1, dsm_rst_n = 1'b1, dsm_en = 1'b1;
  logic [5:0] ctrl_code = '0;
  logic       f_div, mc_test, dmp_test, code_valid;
  int checks = 0, failures = 0;

  frac_n_divider dut (.f_in, .rst_n, .dsm_rst_n, .dsm_en, .ctrl_code,
                      .f_div, .mc_test, .dmp_test, .code_valid);

  always #1 f_in = ~f_in;
  initial #1 begin rst_n = 1'b0; dsm_rst_n = 1'b0; end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fin_count = 0;
  always @(posedge f_in) fin_count++;

  function automatic real fc_mhz(int c);
    if (c < 4)       return 780.0 + 2.0 * c;
    else if (c == 4) return 868.3;
    else if (c < 15) return 906.0 + 2.0 * (c - 5);
    else             return 2405.0 + 5.0 * (c - 15);
  endfunction

  initial begin
    real ratio, drift;
    int  last, p, m, bad;
    longint sum;
    #20 rst_n = 1'b1;
    for (int c = 0; c < 31; c++) begin
      ratio = ((c < 15) ? 3.0 * fc_mhz(c) : fc_mhz(c)) / 20.0;
      m = int'($floor(ratio / 2.0 + 1e-9));
      ctrl_code = 6'(c);
      @(negedge f_div);
      dsm_rst_n = 1'b0;
      #3 dsm_rst_n = 1'b1;
      repeat (2) @(posedge f_div);
      last = fin_count; sum = 0; bad = 0;
      for (int n = 0; n < 400; n++) begin
        @(posedge f_div);
        p = fin_count - last; last = fin_count;
        if (p < 2 * (m - 3) || p > 2 * (m + 4)) bad++;
        sum += p;
      end
      drift = real'(sum) - 400.0 * ratio;
      checks++;
      if (bad != 0) begin failures++; $display("FAIL code %0d: %0d periods out of range", c, bad); end
      checks++;
      if (drift > 16.0 || drift < -16.0) begin
        failures++;
        $display("FAIL code %0d: mean %f, want %f", c, real'(sum) / 400.0, ratio);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
