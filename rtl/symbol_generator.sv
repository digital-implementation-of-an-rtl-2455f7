// Pseudorandom symbol data generator.
//
// Six maximal-length LFSRs of lengths 32, 33, 35, 36, 39 and 41 each give one bit per
// symbol (en = symbol enable). Bit j of the data word comes from LFSR WIRING[j]; the
// word is cut to the 2..6 bits of the modulation mode, unused high bits are zero.
// The LFSR lengths follow the design documentation; the tap sets, the seeds and the
// wiring are not given there, so standard maximal-length taps are used and every
// instance (main and two adjacent channels) gets its own SEEDS and WIRING.
//
// Timing: word is registered state, valid from the clock after reset and changing one
// clock after each en.
module symbol_generator
  import emu_pkg::*;
#(
  parameter logic [40:0] SEEDS  [6] = '{41'h0_1234_5678, 41'h1_8765_4321, 41'h2_5A5A_A5A5,
                                        41'h0_DEAD_BEEF, 41'h1_F0F0_0F0F, 41'h0_C3C3_3C3C},
  parameter int unsigned WIRING [6] = '{0, 1, 2, 3, 4, 5}
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [2:0] mode,
  output logic [5:0] word
);
  localparam int unsigned LENS [6] = '{32, 33, 35, 36, 39, 41};
  localparam logic [40:0] TAPM [6] = '{
    41'h0_8020_0003,                 // 32: 32,22,2,1
    41'h1_0008_0000,                 // 33: 33,20
    41'h5_0000_0000,                 // 35: 35,33
    41'h8_0100_0000,                 // 36: 36,25
    41'h44_0000_0000,                // 39: 39,35
    41'h120_0000_0000                // 41: 41,38
  };

  logic [5:0] bits;

  for (genvar g = 0; g < 6; g++) begin : g_lfsr
    lfsr #(.LEN(LENS[g]), .TAPS(TAPM[g][LENS[g]-1:0])) u_lfsr (
      .clk, .rst, .en, .seed(SEEDS[g][LENS[g]-1:0]), .bit_out(bits[g]));
  end

  always_comb begin
    word = '0;
    for (int j = 0; j < 6; j++)
      if (j < int'(bits_per_symbol(mode))) word[j] = bits[WIRING[j]];
  end
endmodule
