// Multipath (micro-reflection) stage: main path plus three echoes.
//
// The multiplexed I,Q stream is split into a main path and NECHO echo paths. Each echo
// path delays and rotates/attenuates its copy (echo_path); the main path applies no
// gain, only a fixed delay of ECHO_LAT stream steps equal to the echo paths' own
// latency, so that an echo programmed with zero delay lines up with the main signal.
// The sum of all paths is saturated to 2.16 and registered. Echo parameters come from
// the channel profile. Three echoes and the compensating main-path delay follow the
// design documentation; saturation of the sum is this design's choice.
//
// Timing: ECHO_LAT + 1 stream steps from din to dout for the main path.
module multipath
  import emu_pkg::*;
#(
  parameter int NECHO = 3
) (
  input  logic               clk,
  input  logic               rst,
  input  iqmux_t             din,
  input  logic [5:0]         int_dly [NECHO],
  input  logic signed [17:0] frac    [NECHO],
  input  logic signed [17:0] gain_re [NECHO],
  input  logic signed [17:0] gain_im [NECHO],
  output iqmux_t             dout
);
  localparam int ECHO_LAT = 12;

  iqmux_t e [NECHO];
  s18_t   mdl [ECHO_LAT];
  logic   mq  [ECHO_LAT];

  for (genvar n = 0; n < NECHO; n++) begin : g_echo
    echo_path u_echo (.clk, .rst, .din, .int_dly(int_dly[n]), .frac(frac[n]),
                      .gain_re(gain_re[n]), .gain_im(gain_im[n]), .dout(e[n]));
  end

  logic signed [20:0] sum;
  always_comb begin
    sum = 21'(mdl[ECHO_LAT-1]);
    for (int n = 0; n < NECHO; n++) sum += 21'(e[n].d);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < ECHO_LAT; k++) begin
        mdl[k] <= '0; mq[k] <= 1'b0;
      end
      dout <= '0;
    end else begin
      if (din.valid) begin
        mdl[0] <= din.d; mq[0] <= din.q;
        for (int k = 1; k < ECHO_LAT; k++) begin
          mdl[k] <= mdl[k-1]; mq[k] <= mq[k-1];
        end
      end
      // echo outputs update one clock after din.valid; sum them then
      dout.valid <= e[0].valid;
      if (e[0].valid) begin
        dout.q <= mq[ECHO_LAT-1];
        if (sum > 21'sd131071)       dout.d <= 18'sd131071;
        else if (sum < -21'sd131072) dout.d <= -18'sd131072;
        else                         dout.d <= sum[17:0];
      end
    end
  end
endmodule
