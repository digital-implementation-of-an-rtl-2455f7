// Path attenuator.
//
// Multiplies each multiplexed sample (2.16) by the path gain (1.17), keeps the 2.33
// part of the product, truncates the 17 least significant bits to return to 2.16 and
// registers the result, which shortens the settling of the echo adder that follows.
// This follows the design documentation; the saturation of the single overflowing
// case (gain -1 times sample -2) and the valid/q bookkeeping of this design's stream
// convention are additions.
//
// Timing: one clock of latency, one result per din.valid.
module path_attenuator
  import emu_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic signed [17:0] path_gain,
  input  iqmux_t             din,
  output iqmux_t             dout
);
  // 1.17 x 2.16 = 3.33, truncated to 3.16; only -1 x -2 leaves the 2.16 range
  logic signed [18:0] trn;
  assign trn = 19'(36'(path_gain * din.d) >>> 17);

  always_ff @(posedge clk) begin
    if (rst) dout <= '0;
    else begin
      dout.valid <= din.valid;
      if (din.valid) begin
        dout.q <= din.q;
        dout.d <= (trn > 19'sd131071) ? 18'sd131071 : trn[17:0];
      end
    end
  end
endmodule
