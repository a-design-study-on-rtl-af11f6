// gnss_pkg: sizes and constants shared by the blocks of the dual-channel
// Galileo E1 tracking unit (carrier wipe-off, code NCO / PRN generator and
// integrate-and-dump correlators).
//
// Numbers that come from the design study: 51 correlators per I&D unit,
// 3-bit ADC samples, 6-bit wiped-off samples, 23-bit accumulators, 32-bit
// phase words, 4092-chip E1B/E1C codes, an 8-entry carrier LUT, a 100 MHz
// processing clock against a 16.8 Msps sample stream.
// Own choices: the correlator spacing (1/25 chip, so that the 51 taps span
// -1..+1 chip and touch exactly three code chips), the LUT amplitude and the
// replica bit encoding (1 = chip value -1).
package gnss_pkg;

  localparam int unsigned N_TAPS     = 51;    // correlators per I&D unit
  localparam int unsigned ADC_W      = 3;     // ADC sample width (per component)
  localparam int unsigned SAMPLE_W   = 6;     // wiped-off sample width
  localparam int unsigned ACC_W      = 23;    // 6 bit + log2(67200) -> 23 bit
  localparam int unsigned PHASE_W    = 32;    // NCO phase / frequency words
  localparam int unsigned CODE_LEN   = 4092;  // E1B / E1C primary code length
  localparam int unsigned LUT_ADDR_W = 3;     // 8-entry sin/cos LUT

  // Correlator spacing in units of 2^-32 chip: floor(2^32/25), so that tap
  // k sits at (k-25)/25 chip and never reaches a full +-1 chip offset.
  localparam logic [PHASE_W-1:0] TAP_SPACING = 32'd171798691;
  localparam int                 TAP_CENTRE  = (N_TAPS - 1) / 2;

  // Default NCO words for a 100 MHz processing clock.
  // Code: round(1.023e6 / 100e6 * 2^32).
  localparam logic [PHASE_W-1:0] CODE_FREQ_1023K = 32'd43937515;

  // Signed offset of correlator tap k, in 2^-32 chip (34 bit so that -1..+1
  // chip plus a 32-bit fraction never overflows).
  function automatic logic signed [PHASE_W+1:0] tap_offset(input int k);
    return (PHASE_W+2)'(signed'(k - TAP_CENTRE)) * signed'({2'b00, TAP_SPACING});
  endfunction

  // Carrier LUT: amplitude-3 cosine, 3-bit signed, at the 8 phases k*45 deg.
  // cos(k*45deg)*3 rounded: 3, 2, 0, -2, -3, -2, 0, 2.
  function automatic logic signed [ADC_W-1:0] lut_cos(input logic [LUT_ADDR_W-1:0] a);
    case (a)
      3'd0: return  3'sd3;
      3'd1: return  3'sd2;
      3'd2: return  3'sd0;
      3'd3: return -3'sd2;
      3'd4: return -3'sd3;
      3'd5: return -3'sd2;
      3'd6: return  3'sd0;
      default: return 3'sd2;
    endcase
  endfunction

  // sin(x) = cos(x - 90deg): two LUT entries behind the cosine.
  function automatic logic signed [ADC_W-1:0] lut_sin(input logic [LUT_ADDR_W-1:0] a);
    return lut_cos(a - 3'd2);
  endfunction

endpackage
