// Main channel gain boost.
//
// Raises the main channel by +6, +12 or +18 dB with left shifts of 1, 2 or 3 bits
// chosen by three DIP switches, without a multiplier; with none set the gain is 0 dB.
// If several switches are on, +18 dB wins over +12 dB, which wins over +6 dB. The
// 2.16 input is widened to the 6.16 (22-bit) word of the channel stack. The shifts and
// the priority follow the design documentation; the assignment dip[2] = +18 dB,
// dip[1] = +12 dB, dip[0] = +6 dB (DIP[7:5]) is this design's choice.
//
// Timing: one clock of latency.
module gain_boost
  import emu_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [2:0]         dip,
  input  iqpar_t             din,
  output logic               out_valid,
  output logic signed [21:0] out_i,
  output logic signed [21:0] out_q
);
  logic [1:0] sh;
  always_comb begin
    if (dip[2])      sh = 2'd3;
    else if (dip[1]) sh = 2'd2;
    else if (dip[0]) sh = 2'd1;
    else             sh = 2'd0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      out_valid <= din.valid;
      if (din.valid) begin
        out_i <= 22'(din.i) <<< sh;
        out_q <= 22'(din.q) <<< sh;
      end
    end
  end
endmodule
