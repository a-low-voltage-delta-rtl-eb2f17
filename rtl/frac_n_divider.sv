// frac_n_divider: delta-sigma fractional-N frequency divider for a
// multi-band IEEE 802.15.4 synthesizer (20 MHz reference).
//
// Signal path: f_in -> divide-by-two -> 7/8 phase-switching prescaler ->
// inverter -> pulse counter P and swallow counter S -> f_div. In each output
// cycle the prescaler divides by 8 for S of its P cycles and by 7 for the
// rest, so f_div = f_in / (2*(7*P + S)). P and S come from the sum of the
// channel decoder's integer ratio and the output of a 20-bit modified
// MASH 1-1-1 modulator clocked by f_div, whose output (-3..+4) averages
// k_frac / 2**20; the mean ratio f_in/f_div is therefore
// 2*(m_int + k_frac/2**20), adjustable in steps of f_REF/2**20 (about 19 Hz).
//
// The inverter between prescaler and counters makes the counters (and MC)
// change on the falling edge of the prescaler output, while the prescaler
// samples MC on its rising edge, so MC never glitches through the prescaler's
// AND gate.
//
// Ports: f_in (divider input), rst_n (prescaler and counters), dsm_rst_n
// (modulator), dsm_en (1 = fractional, 0 = integer mode), ctrl_code
// (channel), f_div (output to the phase detector), mc_test and dmp_test
// (modulus control and prescaler output, brought out for test), code_valid
// (ctrl_code names a channel). All resets
// are asynchronous and active low. The structure follows the published
// block diagram; the channel code order, the P/S split of the sum and the
// enable input are this design's choices.
module frac_n_divider
  import fracn_pkg::*;
#(
  parameter int unsigned K_BITS = DSM_BITS
) (
  input  logic                 f_in,
  input  logic                 rst_n,
  input  logic                 dsm_rst_n,
  input  logic                 dsm_en,
  input  logic [CODE_BITS-1:0] ctrl_code,
  output logic                 f_div,
  output logic                 mc_test,
  output logic                 dmp_test,
  output logic                 code_valid
);
  logic f_pre_in, f_pre_in_q;   // f_in/2 and its unused quadrature
  logic dmp_out, dmp_y;
  logic f_pre;                  // inverted prescaler output, clocks the counters
  logic mc, en;

  logic [MINT_BITS-1:0] m_int;
  logic [K_BITS-1:0]    k_frac;
  dsm_y_t               dsm_y;
  logic [P_BITS-1:0]    p_val;
  logic [S_BITS-1:0]    s_val;

  div2_scl u_pre_div2 (.clk(f_in), .rst_n, .i(f_pre_in), .q(f_pre_in_q));

  dual_modulus_prescaler u_dmp (
    .f_in(f_pre_in), .rst_n, .mc, .f_out(dmp_out), .y(dmp_y)
  );

  assign f_pre = ~dmp_out;

  pulse_counter   u_pc (.clk(f_pre), .rst_n, .p_in(p_val), .en, .f_div);
  swallow_counter u_sc (.clk(f_pre), .rst_n, .load(en), .s_in(s_val), .mc);

  channel_decoder #(.K_BITS(K_BITS)) u_dec (
    .code(ctrl_code), .m_int, .k_frac, .valid(code_valid)
  );

  mash111_modified #(.K_BITS(K_BITS)) u_dsm (
    .clk(f_div), .rst_n(dsm_rst_n), .en(dsm_en), .k_in(k_frac), .y(dsm_y)
  );

  ratio_adder u_add (.m_int, .dsm_y, .p(p_val), .s(s_val));

  assign mc_test  = mc;
  assign dmp_test = dmp_out;
endmodule
