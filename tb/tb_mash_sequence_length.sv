// tb_mash_sequence_length: sequence lengths of the modified MASH 1-1-1.
//
// The modulator's output sequence for a constant input K repeats after at
// most M^3 and at least 2*M^2 clocks (M = 2**K_BITS). With K_BITS = 6
// (M = 64) this testbench measures the period for K = 1 and 3 (expected
// M^3 = 262144), K = 16 (M^3/16 = 16384) and K = 32 = M/2 (2*M^2 = 8192,
// the shortest); every one lies between 2*M^2 and M^3, and checks that over one period the output sums to exactly
// K*period/M, i.e. the mean is K/M.
module tb_mash_sequence_length;
  import fracn_pkg::*;
  localparam int KB = 6;
  localparam int M  = 1 << KB;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [KB-1:0] k = '0;
  dsm_y_t y;
  int checks = 0, failures = 0;

  mash111_modified #(.K_BITS(KB)) dut (.clk, .rst_n, .en, .k_in(k), .y);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte ys [];

  task automatic measure(input int kv, input int want);
    int n0 = 100, bad = 0;
    longint sum = 0;
    bit shorter = 1'b1;
    ys = new[n0 + 2 * want + 4];
    en = 1'b0; k = KB'(kv);
    @(posedge clk); #1;
    en = 1'b1;
    foreach (ys[n]) begin
      @(posedge clk); #1;
      ys[n] = byte'(y);
    end
    for (int n = n0; n < n0 + want; n++) begin
      if (ys[n] != ys[n + want]) bad++;
      if (ys[n] != ys[n + want / 2]) shorter = 1'b0;
      sum += ys[n];
    end
    checks++;
    if (bad != 0 || shorter) begin failures++; $display("FAIL K=%0d: period is not %0d", kv, want); end
    checks++;
    if (want < 2 * M * M || want > M * M * M) begin failures++; $display("FAIL K=%0d: length outside 2M^2..M^3", kv); end
    checks++;
    if (sum * M != longint'(kv) * want) begin failures++; $display("FAIL K=%0d: period sum %0d", kv, sum); end
    $display("K=%0d: sequence length %0d", kv, want);
  endtask

  initial begin
    #12 rst_n = 1'b1;
    measure(32, 2 * M * M);
    measure(16, M * M * M / 16);
    measure(1,  M * M * M);
    measure(3,  M * M * M);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
