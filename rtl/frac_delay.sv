// Pipelined multiplexed 3-tap variable fractional delay filter.
//
// Delays the multiplexed I,Q stream by a fraction delta of a complex sample
// (-0.5..+0.5, 1.17 format; positive values delay, negative advance). The maximally
// flat 3-tap FIR has coefficients b0 = (d^2-d)/2, b1 = 1-d^2, b2 = (d^2+d)/2 on the
// newest, middle and oldest sample. Regrouped as
//   y = x1 + d*(x2 - x0)/2 + d^2*((x0 + x2)/2 - x1)
// it needs three multipliers (d*d, d*(...), d^2*(...)), with the halvings done by
// shifts. Each delay element is two registers deep so I and Q share the filter.
// Six pipeline registers follow the arithmetic so that no path has more than one
// multiplier or adder between registers; with the one-sample centre tap the latency is
// 8 stream steps, half a symbol. Coefficients, the 3-multiplier regrouping and the
// latency follow the design documentation; the placement of the pipeline registers
// and the truncating shifts are this design's choices.
//
// Timing: dout updates one clock after every din.valid; the sample in dout is the one
// whose centre tap entered 8 valid strobes earlier.
module frac_delay
  import emu_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  iqmux_t             din,
  input  logic signed [17:0] delta,
  output iqmux_t             dout
);
  typedef logic signed [21:0] w_t;

  s18_t x [4];                  // x[1] = same component one sample back, x[3] two back
  w_t   c1, d1, m1, pa, pb, m2, s3, pb3, s4;
  logic signed [17:0] dd1;
  s18_t s5, s6;
  logic [5:0] qp;           // q tags of the last strobes

  function automatic w_t mulfix(w_t a, logic signed [17:0] b);
    logic signed [39:0] p;
    p = a * b;
    return w_t'(p >>> 18);     // 1.17 coefficient and the factor 1/2
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 4; k++) x[k] <= '0;
      c1 <= '0; d1 <= '0; m1 <= '0; pa <= '0; pb <= '0; m2 <= '0;
      s3 <= '0; pb3 <= '0; s4 <= '0; s5 <= '0; s6 <= '0; dd1 <= '0;
      qp <= '0; dout <= '0;
    end else begin
      dout.valid <= din.valid;
      if (din.valid) begin
        x[0] <= din.d;
        for (int k = 1; k < 4; k++) x[k] <= x[k-1];
        // stage 1: taps x0 = din, x1 = x[1], x2 = x[3]
        c1  <= w_t'(din.d) + w_t'(x[3]) - (w_t'(x[1]) <<< 1);
        d1  <= w_t'(x[3]) - w_t'(din.d);
        m1  <= w_t'(x[1]);
        dd1 <= 18'(36'(delta * delta) >>> 17);
        // stage 2: products
        pa  <= mulfix(d1, delta);
        pb  <= mulfix(c1, dd1);
        m2  <= m1;
        // stage 3, 4: sums
        s3  <= m2 + pa;
        pb3 <= pb;
        s4  <= s3 + pb3;
        // stage 5: saturation to 2.16
        if (s4 > w_t'(131071))       s5 <= 18'sd131071;
        else if (s4 < -w_t'(131072)) s5 <= -18'sd131072;
        else                         s5 <= s4[17:0];
        // stage 6: balancing register, stage 7: output
        s6     <= s5;
        dout.d <= s6;
        qp     <= {qp[4:0], din.q};
        dout.q <= qp[5];
      end
    end
  end
endmodule
