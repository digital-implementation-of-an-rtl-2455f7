// Fibonacci linear feedback shift register.
//
// Stages s1..sLEN are held in state[0]..state[LEN-1]. Each enabled clock shifts
// s1 -> s2 -> ... -> sLEN and loads into s1 the XOR of the stages marked in TAPS
// (bit k-1 set for stage k). The seed is loaded by reset. The 3-stage default
// (XOR of s2 and s3 into s1) is the small example of the design documentation and
// runs through 7 states; the symbol and noise generators use long maximal-length
// registers with standard tap sets, which are this design's choice.
//
// Interface: en advances one step; bit_out is the last stage sLEN.
// Timing: bit_out changes one clock after an enabled clock.
module lfsr #(
  parameter int unsigned    LEN  = 3,
  parameter logic [LEN-1:0] TAPS = 3'b110
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           en,
  input  logic [LEN-1:0] seed,
  output logic           bit_out
);
  logic [LEN-1:0] state;
  logic           fb;
  assign fb      = ^(state & TAPS);
  assign bit_out = state[LEN-1];

  always_ff @(posedge clk) begin
    if (rst)     state <= seed;
    else if (en) state <= {state[LEN-2:0], fb};
  end
endmodule
