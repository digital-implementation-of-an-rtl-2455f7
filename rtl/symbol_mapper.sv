// DOCSIS upstream symbol mapper.
//
// Maps a 2..6-bit data word to Gray-coded I and Q constellation coordinates for the
// six TDMA modulation modes: QPSK0 (+-8), QPSK1 (+-12), 8-QAM, 16-QAM (+-4, +-12),
// 32-QAM and 64-QAM (+-2 .. +-14). Coordinates are even integers, carried as 5-bit
// signed words read in 1.4 format (value/16). The points and bit labels are those of
// the DOCSIS upstream constellations; 16- and 64-QAM pick each axis with alternate
// data bits (I: bits 5,3,1 / Q: bits 4,2,0) through a small lookup, 8- and 32-QAM
// (which are not separable) use full tables. The mode encoding is this design's.
//
// Combinational: the outputs follow the inputs, so a mode change takes effect at once.
module symbol_mapper
  import emu_pkg::*;
(
  input  logic [5:0] data,
  input  logic [2:0] mode,
  output sym_t       i_out,
  output sym_t       q_out
);
  // 16-QAM axis lookup, index {sign bit, magnitude bit}.
  function automatic sym_t lut16(logic [1:0] s);
    case (s)
      2'd0: return -5'sd4;
      2'd1: return -5'sd12;
      2'd2: return  5'sd4;
      default: return 5'sd12;
    endcase
  endfunction

  // 64-QAM axis lookup, index {sign, b_hi, b_lo}; Gray magnitudes 2,6,14,10.
  function automatic sym_t lut64(logic [2:0] s);
    logic signed [4:0] m;
    case (s[1:0])
      2'b00: m = 5'sd2;
      2'b01: m = 5'sd6;
      2'b11: m = 5'sd10;
      default: m = 5'sd14;
    endcase
    return s[2] ? m : -m;
  endfunction

  function automatic logic [9:0] map8(logic [2:0] w);
    case (w)
      3'b000: return {5'sd4,   -5'sd12};
      3'b001: return {5'sd12,  -5'sd4};
      3'b010: return {-5'sd4,  -5'sd4};
      3'b011: return {5'sd4,    5'sd4};
      3'b100: return {-5'sd12, -5'sd12};
      3'b101: return {5'sd12,   5'sd12};
      3'b110: return {-5'sd12,  5'sd4};
      default: return {-5'sd4,  5'sd12};
    endcase
  endfunction

  function automatic logic [9:0] map32(logic [4:0] w);
    case (w)
      5'b11111: return {-5'sd10,  5'sd14};
      5'b11010: return {-5'sd2,   5'sd14};
      5'b10010: return { 5'sd6,   5'sd14};
      5'b10111: return { 5'sd14,  5'sd14};
      5'b11101: return {-5'sd14,  5'sd10};
      5'b11011: return {-5'sd6,   5'sd10};
      5'b01010: return { 5'sd2,   5'sd10};
      5'b10110: return { 5'sd10,  5'sd10};
      5'b11001: return {-5'sd10,  5'sd6};
      5'b01011: return {-5'sd2,   5'sd6};
      5'b01110: return { 5'sd6,   5'sd6};
      5'b11110: return { 5'sd14,  5'sd6};
      5'b11000: return {-5'sd14,  5'sd2};
      5'b01001: return {-5'sd6,   5'sd2};
      5'b01111: return { 5'sd2,   5'sd2};
      5'b00110: return { 5'sd10,  5'sd2};
      5'b01000: return {-5'sd10, -5'sd2};
      5'b01101: return {-5'sd2,  -5'sd2};
      5'b00111: return { 5'sd6,  -5'sd2};
      5'b00010: return { 5'sd14, -5'sd2};
      5'b10000: return {-5'sd14, -5'sd6};
      5'b01100: return {-5'sd6,  -5'sd6};
      5'b00101: return { 5'sd2,  -5'sd6};
      5'b00011: return { 5'sd10, -5'sd6};
      5'b10100: return {-5'sd10, -5'sd10};
      5'b00100: return {-5'sd2,  -5'sd10};
      5'b00001: return { 5'sd6,  -5'sd10};
      5'b10011: return { 5'sd14, -5'sd10};
      5'b10101: return {-5'sd14, -5'sd14};
      5'b11100: return {-5'sd6,  -5'sd14};
      5'b00000: return { 5'sd2,  -5'sd14};
      default:  return { 5'sd10, -5'sd14};   // 5'b10001
    endcase
  endfunction

  always_comb begin
    logic [9:0] iq;
    iq = '0;
    case (mode)
      MOD_QPSK0: iq = {(data[1] ? 5'sd8  : -5'sd8),  (data[0] ? 5'sd8  : -5'sd8)};
      MOD_QPSK1: iq = {(data[1] ? 5'sd12 : -5'sd12), (data[0] ? 5'sd12 : -5'sd12)};
      MOD_8QAM:  iq = map8(data[2:0]);
      MOD_16QAM: iq = {lut16({data[3], data[1]}), lut16({data[2], data[0]})};
      MOD_32QAM: iq = map32(data[4:0]);
      default:   iq = {lut64({data[5], data[3], data[1]}), lut64({data[4], data[2], data[0]})};
    endcase
    i_out = iq[9:5];
    q_out = iq[4:0];
  end
endmodule
