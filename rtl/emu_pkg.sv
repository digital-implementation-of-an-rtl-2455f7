// Package shared by the upstream QAM modulator / channel emulator.
//
// It holds the sample formats, the stream bundles that connect the blocks, the
// modulation-mode encoding, the slot map of the channel-profile parameters and the
// constant tables (pulse-shaping coefficients, CORDIC angles, logarithm increments).
//
// Number formats follow the "integer.fraction" notation: 2.16 is an 18-bit two's
// complement value with 2 integer bits (sign included) and 16 fractional bits, 1.4 is
// a 5-bit symbol coordinate, 1.17 an 18-bit coefficient.
//
// Tables: the pulse-shaping coefficients are the square-root raised cosine
//   h(t) = [sin(pi t (1-a)) + 4 a t cos(pi t (1+a))] / [pi t (1 - (4 a t)^2)],
// t in symbols, sampled at 4 samples/symbol, scaled so that the centre tap is 131071
// (1.17 format). Main channel: a = 0.25, 33 taps (8 symbols). Adjacent channels:
// a = 0.125, 65 taps (16 symbols), multiplied by a Kaiser window with beta = 4.1.
// CORDIC angles: round(atan(2^-i) / (2 pi) * 2^32). Logarithm increments:
// round(ln(1 + 2^-k) * 2^34).
package emu_pkg;

  typedef logic signed [17:0] s18_t;      // 2.16 sample
  typedef logic signed [4:0]  sym_t;      // 1.4 mapped symbol coordinate

  // Multiplexed I/Q stream: one sample per valid strobe, q tells which component.
  typedef struct packed {
    logic valid;
    logic q;
    s18_t d;
  } iqmux_t;

  // Parallel I/Q stream.
  typedef struct packed {
    logic valid;
    s18_t i;
    s18_t q;
  } iqpar_t;

  // Clock enables derived from the single clk32-rate clock.
  typedef struct packed {
    logic ce8;              // 8 per symbol
    logic ce16;             // 16 per symbol
    logic [2:0] sel16;      // clk16 tick within a half symbol
    logic half;             // 0: first (I) half of the symbol, 1: second (Q) half
    logic [4:0] tick;       // clk32 tick within the symbol
  } timing_t;

  typedef enum logic [2:0] {
    MOD_QPSK0 = 3'd0,
    MOD_QPSK1 = 3'd1,
    MOD_8QAM  = 3'd2,
    MOD_16QAM = 3'd3,
    MOD_32QAM = 3'd4,
    MOD_64QAM = 3'd5
  } mod_e;

  function automatic int unsigned bits_per_symbol(logic [2:0] m);
    case (m)
      MOD_QPSK0, MOD_QPSK1: return 2;
      MOD_8QAM:             return 3;
      MOD_16QAM:            return 4;
      MOD_32QAM:            return 5;
      default:              return 6;
    endcase
  endfunction

  // Channel-profile slot map (31 parameter slots of 32 bits).
  localparam int NSLOT         = 31;
  localparam int P_MAIN_MODE   = 0;   // [2:0]
  localparam int P_ADJ1_MODE   = 1;   // [2:0]
  localparam int P_ADJ2_MODE   = 2;   // [2:0]
  localparam int P_PRE_LEN     = 3;   // [8:0] 0..256 preamble symbols
  localparam int P_MAIN_FREQ   = 4;   // [31:0] phase increment per 8x sample
  localparam int P_ADJ1_FREQ   = 5;
  localparam int P_ADJ2_FREQ   = 6;
  localparam int P_ECHO_BASE   = 7;   // 4 slots per echo: int delay, frac, gain re, gain im
  localparam int P_ADJ1_GAIN   = 19;  // [16:0] 0.17
  localparam int P_ADJ2_GAIN   = 20;
  localparam int P_ADJ1_SHIFT  = 21;  // [2:0]
  localparam int P_ADJ2_SHIFT  = 22;
  localparam int P_NOISE_LEVEL = 23;  // [17:0] 1.17 unsigned

  localparam logic [16:0] MAIN_PS_GAIN = 17'd131071;

  localparam int NTAP_MAIN = 33;
  localparam int NTAP_ADJ  = 65;

  localparam int signed COEF_MAIN [NTAP_MAIN] = '{
    2604, 1218, -2245, -5238, -4602, 739, 8011, 11546, 6509, -6747, -20894, -24381,
    -7881, 29183, 76288, 115717, 131071, 115717, 76288, 29183, -7881, -24381, -20894,
    -6747, 6509, 11546, 8011, 739, -4602, -5238, -2245, 1218, 2604};

  localparam int signed COEF_ADJ [NTAP_ADJ] = '{
    109, 70, -90, -289, -339, -85, 420, 845, 748, -62, -1235, -1934, -1349, 600, 2894,
    3819, 2101, -1919, -5961, -6907, -2909, 4765, 11624, 12186, 3637, -11228, -23943,
    -23917, -4146, 33966, 79659, 116796, 131071, 116796, 79659, 33966, -4146, -23917,
    -23943, -11228, 3637, 12186, 11624, 4765, -2909, -6907, -5961, -1919, 2101, 3819,
    2894, 600, -1349, -1934, -1235, -62, 748, 845, 420, -85, -339, -289, -90, 70, 109};

  // Two-path half-band interpolator allpass coefficients, 1.17.
  localparam int signed UPS_ALPHA0 = 63630;   // 0.4854569008708127
  localparam int signed UPS_ALPHA1 = -9449;   // -0.07209196329829355

  localparam logic [31:0] CORDIC_ATAN [18] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756, 32'd42667331,
    32'd21354465, 32'd10679838, 32'd5340245, 32'd2670163, 32'd1335087, 32'd667544,
    32'd333772, 32'd166886, 32'd83443, 32'd41722, 32'd20861, 32'd10430, 32'd5215};

  localparam logic [17:0] CORDIC_INV_GAIN = 18'd79594;   // 2^17 / 1.6467602581
  localparam logic [17:0] SQRT2_OVER_K    = 18'd56281;   // sqrt(2)/K in 2.16

  localparam logic [36:0] LN_INC [18] = '{
    37'd6965837516, 37'd3833577021, 37'd2023497145, 37'd1041523072, 37'd528653070,
    37'd266359896, 37'd133696155, 37'd66978132, 37'd33521707, 37'd16769029,
    37'd8386561, 37'd4193792, 37'd2097024, 37'd1048544, 37'd524280, 37'd262142,
    37'd131072, 37'd65536};
  localparam logic [36:0] LN2_C = 37'd11908177887;   // ln 2 * 2^34

endpackage
