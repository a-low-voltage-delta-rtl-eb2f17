// tb_phase_control: checks the reset value and the rotation of the phase
// selection ring, which must visit p0, p3, p2, p1 (each the phase leading
// the previous one) and return to p0, over several rounds and after a
// second reset.
module tb_phase_control;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [3:0] sel;
  int checks = 0, failures = 0;
  int expect_idx;
  int order [4] = '{0, 3, 2, 1};

  phase_control dut (.clk, .rst_n, .sel);

  // drive reset low after time 0 so the asynchronous reset sees an edge
  initial #1 rst_n = 1'b0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse();
    #5 clk = 1'b1; #5 clk = 1'b0;
  endtask

  task automatic check_sel(input int idx);
    checks++;
    if (sel !== 4'(1 << idx)) begin
      failures++;
      $display("FAIL sel=%b expected p%0d", sel, idx);
    end
  endtask

  initial begin
    #3;
    check_sel(0);
    rst_n = 1'b1;
    for (int r = 0; r < 3; r++) begin
      for (int n = 1; n <= 4; n++) begin
        pulse();
        check_sel(order[n % 4]);
      end
    end
    pulse(); pulse();
    rst_n = 1'b0; #1;
    check_sel(0);
    rst_n = 1'b1;
    pulse();
    check_sel(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
