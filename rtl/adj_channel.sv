// One adjacent channel: a complete transmit chain without preamble or echoes.
//
// A pseudorandom symbol generator (its own seeds and wiring) feeds the symbol mapper;
// the 16-symbol windowed pulse-shaping filter (8 DSMACs) applies the channel gain
// parameter; the upsampler doubles the rate to 8 samples/symbol per component; the
// multiplexed stream is demultiplexed and frequency shifted by the CORDIC complex
// multiplier. The extra gain by a bit shift is applied where the channels are
// stacked. The chain follows the design documentation; the choice of seeds and
// wiring is this design's.
//
// Timing: the output is one complex sample per 4 clocks (8 per symbol); the delay
// from symbol to output is longer than the main channel's because of the longer filter.
module adj_channel
  import emu_pkg::*;
#(
  parameter logic [40:0] SEEDS  [6] = '{41'h0_0BAD_F00D, 41'h1_3579_BDF1, 41'h0_2468_ACE0,
                                        41'h1_1357_2468, 41'h0_7777_1111, 41'h1_ABCD_EF01},
  parameter int unsigned WIRING [6] = '{3, 5, 0, 4, 1, 2}
) (
  input  logic        clk,
  input  logic        rst,
  input  timing_t     tim,
  input  logic        sym_en,
  input  logic [2:0]  mode,
  input  logic [16:0] gain,
  input  logic [31:0] freq,
  output iqpar_t      dout
);
  logic [5:0] word;
  sym_t       si, sq;
  iqmux_t     ps, up;
  iqpar_t     par;

  symbol_generator #(.SEEDS(SEEDS), .WIRING(WIRING)) u_gen (
    .clk, .rst, .en(sym_en), .mode, .word);
  symbol_mapper u_map (.data(word), .mode, .i_out(si), .q_out(sq));
  ps_filter #(.NSYM(16)) u_ps (.clk, .rst, .tim, .sym_i(si), .sym_q(sq), .gain, .dout(ps));
  upsampler u_up (.clk, .rst, .din(ps), .dout(up));
  cordic_demux u_dm (.clk, .rst, .din(up), .dout(par));
  cordic_cmul u_cm (.clk, .rst, .din(par), .freq, .dout(dout));
endmodule
