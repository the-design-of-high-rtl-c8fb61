// ddc_pkg: widths, rates and filter coefficients shared by the wideband
// receiver's digital down-converter (DDC).
//
// The DDC runs on one 192 MHz clock. ADC samples arrive at 192 MS/s with 12
// bits; the selected narrowband channel leaves at 240 kS/s with 16 bits after
// a total decimation of 25 (CIC) * 2^5 (five half-band stages) = 800.
//
// Numbers taken from the design description: 192 MHz clock and sample rate,
// 12-bit ADC samples, 32-bit DDS phase, 16-bit sine, 1800 channels, CIC
// N=3/M=1/R=25 with 16-bit input, five half-band stages (7 taps for stages
// 1-4, 11 taps for stage 5), 16-bit stage outputs, a 112-tap shaping filter.
// Choices of this design: all filter coefficients (the description gives only
// the filter specifications), the scaling shifts, and the ROM contents formula.
package ddc_pkg;

  localparam int ADC_W     = 12;   // ADC sample width
  localparam int DATA_W    = 16;   // width between filter stages
  localparam int PHASE_W   = 32;   // DDS phase accumulator width
  localparam int SIN_W     = 16;   // DDS sine output width
  localparam int N_CHAN    = 1800; // channels held in the frequency-word ROM
  localparam int CHAN_W    = 11;   // channel number width (1..1800)

  // Frequency control words: FCW(k) = FCW0 + k * FCW_STEP for address k.
  // FCW0 and FCW_STEP reproduce the first two published table entries
  // (0x4D52316D, 0x4D5990DD): channel 1 at 57.99 MHz, 21.6 kHz spacing
  // (FCW_STEP * 192 MHz / 2^32).
  localparam logic [PHASE_W-1:0] FCW0     = 32'h4D52_316D;
  localparam logic [PHASE_W-1:0] FCW_STEP = 32'h0007_5F70;

  // CIC decimator: order 3, differential delay 1, decimation 25.
  // Register width from Bmax = N*log2(R*M) + Bin = 3*4.64 + 16 -> 30 bits.
  localparam int CIC_N     = 3;
  localparam int CIC_R     = 25;
  localparam int CIC_M     = 1;
  localparam int CIC_W     = 30;
  // CIC gain is 25^3 = 15625; the output keeps bits [27:12] (gain 3.81) and
  // saturates, so a weak channel gains level at the cost of clipping strong ones.
  localparam int CIC_SHIFT = 12;

  // Half-band decimators (each halves the rate): maximally flat designs.
  // 7 taps, sum 32:  h = [-1 0 9 16 9 0 -1] / 32
  // 11 taps, sum 512: h = [3 0 -25 0 150 256 150 0 -25 0 3] / 512
  localparam int HB_STAGES   = 5;
  localparam int HB7_TAPS    = 7;
  localparam int HB7_SHIFT   = 5;
  localparam int HB7_COEF  [HB7_TAPS]  = '{-1, 0, 9, 16, 9, 0, -1};
  localparam int HB11_TAPS   = 11;
  localparam int HB11_SHIFT  = 9;
  localparam int HB11_COEF [HB11_TAPS] = '{3, 0, -25, 0, 150, 256, 150, 0, -25, 0, 3};

  // Shaping filter: 112-tap linear-phase equiripple (Parks-McClellan) low-pass
  // at 240 kS/s, pass band 0..24 kHz, stop band from 34 kHz, stop-band weight
  // 5, coefficients round(h * 2^17). Only the first half is stored; tap k and
  // tap 111-k are equal. Quantised response: pass-band ripple 0.0003,
  // stop-band attenuation 78 dB.
  localparam int SHAPE_TAPS  = 112;
  localparam int SHAPE_SHIFT = 17;
  localparam int SHAPE_COEF_W = 16;
  localparam int SHAPE_HALF [SHAPE_TAPS/2] = '{
        -2,      6,     13,     17,     14,      0,    -21,    -39,
       -38,    -12,     33,     75,     84,     42,    -41,   -127,
      -160,   -102,     36,    192,    273,    207,     -4,   -267,
      -432,   -374,    -75,    339,    643,    626,    228,   -394,
      -912,   -991,   -493,    405,   1247,   1516,    932,   -334,
     -1669,  -2290,  -1667,    107,   2239,   3537,   3005,    457,
     -3175,  -6053,  -6142,  -2142,   5774,  15805,  25057,  30597
  };

  // Saturate a wide signed value to DATA_W bits.
  function automatic logic signed [DATA_W-1:0] sat16(input logic signed [63:0] v);
    if (v > 64'sd32767)       return 16'sh7FFF;
    else if (v < -64'sd32768) return 16'sh8000;
    else                      return v[DATA_W-1:0];
  endfunction

  // True when a wide signed value lies outside the DATA_W range.
  function automatic logic ovf16(input logic signed [63:0] v);
    return (v > 64'sd32767) || (v < -64'sd32768);
  endfunction

endpackage
