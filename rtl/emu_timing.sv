// Symbol timing generator.
//
// The emulator runs from one clock at 32 ticks per symbol (the 160 MHz clk32 rate of
// a 5 Msymbol/s design). Instead of separate 5/10/40/80 MHz clocks and their inverted
// copies, this block counts clk32 ticks within a symbol and issues one-tick clock
// enables at 8 and 16 samples per symbol (tim) and once per symbol (sym_en), plus the 3-bit sel16 count of clk16
// ticks within a half symbol and the half-symbol flag used by the multiplexed I/Q
// pulse-shaping filters. The rates follow the clock table of the design; using
// enables on a single clock, and the counter layout, are this design's choices.
//
// Timing: tick 0 of every symbol carries sym_en, ce8 and ce16 together.
module emu_timing
  import emu_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  output timing_t tim,
  output logic    sym_en
);
  logic [4:0] tick;

  always_ff @(posedge clk) begin
    if (rst) tick <= '0;
    else     tick <= tick + 5'd1;
  end

  always_comb begin
    tim.tick  = tick;
    tim.ce16  = (tick[0] == 1'b0);
    tim.ce8   = (tick[1:0] == 2'b00);
    tim.sel16 = tick[3:1];
    tim.half  = tick[4];
    sym_en    = (tick == 5'd0);
  end
endmodule
