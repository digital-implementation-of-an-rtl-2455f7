// Multiplexed complex shift register (integer echo delay).
//
// The multiplexed I,Q stream at 16 samples/symbol moves through 126 registers, one
// step per sample. Because I and Q alternate, every second register holds a complete
// complex sample, so the output selector has 64 inputs: input 0 is the undelayed
// stream and input k the output of register 2k, a delay of k complex samples
// (25 ns each at 8 samples/symbol), 0..63 in all. This follows the design
// documentation; registering the selector output (one stream step of latency) is this
// design's choice.
//
// Timing: dout follows din.valid one clock later; delay = sample_delay complex samples
// plus one stream step.
module cshift_reg
  import emu_pkg::*;
#(
  parameter int MAXDLY = 63
) (
  input  logic                          clk,
  input  logic                          rst,
  input  iqmux_t                        din,
  input  logic [$clog2(MAXDLY+1)-1:0]   sample_delay,
  output iqmux_t                        dout
);
  localparam int NR = 2 * MAXDLY;
  s18_t r [NR];
  s18_t tap;

  always_comb begin
    if (sample_delay == '0) tap = din.d;
    else                    tap = r[2 * int'(sample_delay) - 1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NR; k++) r[k] <= '0;
      dout <= '0;
    end else begin
      dout.valid <= din.valid;
      if (din.valid) begin
        r[0] <= din.d;
        for (int k = 1; k < NR; k++) r[k] <= r[k-1];
        dout.q <= din.q;
        dout.d <= tap;
      end
    end
  end
endmodule
