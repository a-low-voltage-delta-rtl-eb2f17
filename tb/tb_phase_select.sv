// tb_phase_select: exhaustive check of the one-hot phase selector: for all
// 16 phase patterns and the four one-hot selections, y must equal the
// selected phase.
module tb_phase_select;
  logic [3:0] p, sel;
  logic y;
  int checks = 0, failures = 0;

  phase_select dut (.p, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int v = 0; v < 16; v++) begin
        p = 4'(v); sel = 4'(1 << s);
        #1;
        checks++;
        if (y !== ((v >> s) & 1)) begin
          failures++;
          $display("FAIL p=%b sel=%b y=%b", p, sel, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
