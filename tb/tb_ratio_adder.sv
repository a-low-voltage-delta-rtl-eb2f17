// tb_ratio_adder: exhaustive check of the ratio adder over the integer
// ratios of the channel table (55..72) and all modulator outputs (-3..+4):
// 7*P + S must equal m_int + y, with S in 0..6 and P in 7..10.
module tb_ratio_adder;
  import fracn_pkg::*;
  logic [6:0] m_int;
  dsm_y_t     dsm_y;
  logic [3:0] p;
  logic [2:0] s;
  int checks = 0, failures = 0;

  ratio_adder dut (.m_int, .dsm_y, .p, .s);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 55; m <= 72; m++) begin
      for (int y = -3; y <= 4; y++) begin
        m_int = 7'(m); dsm_y = 4'(y);
        #1;
        checks++;
        if (7 * int'(p) + int'(s) != m + y || s > 6 || p < 7 || p > 10) begin
          failures++;
          $display("FAIL m=%0d y=%0d -> P=%0d S=%0d", m, y, p, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
