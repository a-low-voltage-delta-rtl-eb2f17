// tb_channel_decoder: checks every channel entry against the channel
// frequencies worked out here in floating point.
//
// For each code the expected counter ratio is f_IN / 40 MHz, with f_IN = 3*Fc
// below 1 GHz and Fc in the 2.4 GHz band; m_int must be its integer part and
// k_frac its fraction times 2**20, rounded. Code 4 (868.3 MHz) must give a
// total division of 130.245. Codes 31..63 must clear valid.
module tb_channel_decoder;
  logic [5:0]  code;
  logic [6:0]  m_int;
  logic [19:0] k_frac;
  logic        valid;
  int checks = 0, failures = 0;

  channel_decoder dut (.code, .m_int, .k_frac, .valid);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fc_mhz(int c);
    if (c < 4)       return 780.0 + 2.0 * c;
    else if (c == 4) return 868.3;
    else if (c < 15) return 906.0 + 2.0 * (c - 5);
    else             return 2405.0 + 5.0 * (c - 15);
  endfunction

  initial begin
    real fin, r, frac, total;
    int  m, k;
    for (int c = 0; c < 64; c++) begin
      code = 6'(c);
      #1;
      if (c < 31) begin
        fin  = (c < 15) ? 3.0 * fc_mhz(c) : fc_mhz(c);
        r    = fin / 40.0;
        m    = int'($floor(r + 1e-9));
        frac = r - m;
        k    = int'($floor(frac * 1048576.0 + 0.5));
        checks++;
        if (!valid || int'(m_int) != m || int'(k_frac) != k) begin
          failures++;
          $display("FAIL code %0d: got %0d + %0d, want %0d + %0d", c, m_int, k_frac, m, k);
        end
        if (c == 4) begin
          total = 2.0 * (m_int + k_frac / 1048576.0);
          checks++;
          if (total < 130.245 - 1e-5 || total > 130.245 + 1e-5) begin
            failures++;
            $display("FAIL code 4 total ratio %f", total);
          end
        end
      end else begin
        checks++;
        if (valid) begin failures++; $display("FAIL code %0d reported valid", c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
