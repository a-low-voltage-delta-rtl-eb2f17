// channel_decoder: control code to divide ratio for the IEEE 802.15.4 bands.
//
// The divider input is the VCO frequency halved, f_IN. For the 780, 868
// and 915 MHz bands the local oscillator is f_IN/3, for the 2.4 GHz band it
// is f_IN itself. The counters see f_IN/2 and the reference is F_REF, so the
// wanted counter ratio is R = f_IN / (2*F_REF) = m_int + k_frac / 2**K_BITS.
// This module holds that ratio for every channel:
//
//   code  0..3  : Fc = 780 + 2*code MHz        f_IN = 3*Fc   (780 MHz band)
//   code  4     : Fc = 868.3 MHz               f_IN = 3*Fc   (868 MHz band)
//   code  5..14 : Fc = 906 + 2*(code-5) MHz    f_IN = 3*Fc   (915 MHz band)
//   code 15..30 : Fc = 2405 + 5*(code-15) MHz  f_IN = Fc     (2.4 GHz band)
//
// Frequencies are handled in 100 kHz units, so with F = f_IN/100 kHz and
// D = 2*F_REF/100 kHz: m_int = F div D and k_frac = round((F mod D)*2**K_BITS/D).
// Code 4 gives R = 65.1225, twice that is 130.245. The channel frequencies
// are the standard's; the code order and the absence of an IF offset are
// this design's choices. Codes 31..63 select code 0 and clear valid. The
// table is computed at elaboration; the module is combinational.
module channel_decoder
  import fracn_pkg::*;
#(
  parameter int unsigned K_BITS       = DSM_BITS,
  parameter int unsigned F_REF_100KHZ = 200        // 20 MHz reference
) (
  input  logic [CODE_BITS-1:0] code,
  output logic [MINT_BITS-1:0] m_int,
  output logic [K_BITS-1:0]    k_frac,
  output logic                 valid
);
  typedef struct packed {
    logic [MINT_BITS-1:0] m_int;
    logic [K_BITS-1:0]    k_frac;
  } ratio_t;
  typedef ratio_t [NUM_CHANNELS-1:0] table_t;

  // f_IN in 100 kHz units for each code.
  function automatic longint unsigned f_in_100khz(longint unsigned c);
    if (c < 4)       return 3 * (7800 + 20 * c);
    else if (c == 4) return 3 * 8683;
    else if (c < 15) return 3 * (9060 + 20 * (c - 5));
    else             return 24050 + 50 * (c - 15);
  endfunction

  function automatic table_t build_table();
    table_t tab;
    longint unsigned f, d, rem, num;
    d = 2 * F_REF_100KHZ;
    for (int c = 0; c < NUM_CHANNELS; c++) begin
      f   = f_in_100khz(longint'(c));
      rem = f % d;
      num = (rem << K_BITS) + d / 2;          // round to nearest
      tab[c].m_int  = MINT_BITS'(f / d);
      tab[c].k_frac = K_BITS'(num / d);
    end
    return tab;
  endfunction

  localparam table_t TABLE = build_table();

  ratio_t entry;

  always_comb begin
    valid = (int'(code) < NUM_CHANNELS);
    entry = valid ? TABLE[code[4:0]] : TABLE[0];
    m_int  = entry.m_int;
    k_frac = entry.k_frac;
  end
endmodule
