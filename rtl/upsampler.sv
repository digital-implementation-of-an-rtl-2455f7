// Multiplexed two-path half-band interpolator (upsample by 2) with output interleaver.
//
// Input: multiplexed I,Q stream at 8 samples/symbol (4 per component), 2.16. Output:
// multiplexed I,Q stream at 16 samples/symbol (8 per component), 2.16, one sample every
// second clock.
//
// How it works. The image-rejection low-pass is the polyphase pair of a nearly linear
// phase half-band filter: path 0 is a pure delay of two input samples, path 1 is a
// cascade of two first-order allpass sections A(z) = (a + z^-1)/(1 + a z^-1), each
// computed with one multiplier as y[n] = a*(x[n] - y[n-1]) + x[n-1], with
// a0 = 0.4854569 and a1 = -0.0720920 rounded to 1.17. Both paths run at the input rate
// and a commutator takes path 0 then path 1, doubling the rate. I and Q share the
// hardware: every delay element is two registers deep. The commutator output is
// ordered I,I,Q,Q; a 4-sample shift register with snapshot registers and a 4-way output
// selector reorders it to I,Q,I,Q.
//
// Path lengths, allpass order and coefficients follow the design documentation. The
// allpass section form, the 2.22 internal precision and the sample order inside the
// reorder buffer are this design's choices.
//
// Timing: a new input sample may arrive every 4 clocks (din.valid). Its two outputs
// leave 1 and 3 clocks later from the filter and reach dout 4 output samples later.
module upsampler
  import emu_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  iqmux_t din,
  output iqmux_t dout
);
  localparam int IW = 24;   // 2.22 internal
  typedef logic signed [IW-1:0] w_t;

  localparam logic signed [17:0] A0 = 18'(UPS_ALPHA0);
  localparam logic signed [17:0] A1 = 18'(UPS_ALPHA1);

  w_t xin;
  assign xin = {din.d, 6'd0};

  // two-deep delay elements (I and Q interleaved)
  w_t d0 [4];               // path 0: two input samples per component
  w_t x1 [2], y1 [2];       // section 0 input / output history
  w_t y2 [2];               // section 1 output history (its input history is y1)

  function automatic w_t ap(w_t x, w_t xprev, w_t yprev, logic signed [17:0] a);
    logic signed [IW+17:0] p;
    p = ((IW+18)'(x) - (IW+18)'(yprev)) * a;
    return w_t'(p >>> 17) + xprev;
  endfunction

  w_t s1, s2;
  assign s1 = ap(xin, x1[1], y1[1], A0);
  assign s2 = ap(s1, y1[1], y2[1], A1);

  function automatic s18_t rnd(w_t v);
    w_t r;
    r = (v + w_t'(32)) >>> 6;
    if (r > w_t'(131071))       return 18'sd131071;
    else if (r < -w_t'(131072)) return -18'sd131072;
    else                        return r[17:0];
  endfunction

  // commutator
  s18_t p0r, p1r;
  logic qr;
  logic [1:0] cstep;        // 1: emit path 0, 3: emit path 1
  iqmux_t fo;               // filter output, I,I,Q,Q
  logic   fo_path;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 4; k++) d0[k] <= '0;
      for (int k = 0; k < 2; k++) begin
        x1[k] <= '0; y1[k] <= '0; y2[k] <= '0;
      end
      p0r <= '0; p1r <= '0; qr <= 1'b0; cstep <= '0;
      fo <= '0; fo_path <= 1'b0;
    end else begin
      fo.valid <= 1'b0;
      if (din.valid) begin
        d0[0] <= xin;
        for (int k = 1; k < 4; k++) d0[k] <= d0[k-1];
        x1[0] <= xin; x1[1] <= x1[0];
        y1[0] <= s1;  y1[1] <= y1[0];
        y2[0] <= s2;  y2[1] <= y2[0];
        p0r   <= rnd(d0[3]);
        p1r   <= rnd(s2);
        qr    <= din.q;
        cstep <= 2'd1;
      end else if (cstep != 2'd0) begin
        cstep <= cstep + 2'd1;
      end
      if (cstep == 2'd1) begin
        fo <= '{valid: 1'b1, q: qr, d: p0r};
        fo_path <= 1'b0;
      end else if (cstep == 2'd3) begin
        fo <= '{valid: 1'b1, q: qr, d: p1r};
        fo_path <= 1'b1;
      end
    end
  end

  // output interleaver: I0 I1 Q0 Q1 -> I0 Q0 I1 Q1
  s18_t sr [4];
  s18_t snap [4];
  logic [1:0] ocnt;
  logic       have;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 4; k++) begin
        sr[k] <= '0; snap[k] <= '0;
      end
      ocnt <= '0; have <= 1'b0; dout <= '0;
    end else begin
      dout.valid <= 1'b0;
      if (fo.valid) begin
        sr[0] <= fo.d;
        for (int k = 1; k < 4; k++) sr[k] <= sr[k-1];
        if (have) begin
          dout.valid <= 1'b1;
          dout.q     <= ocnt[0];
          dout.d     <= snap[{ocnt[0], ocnt[1]}];
          ocnt       <= ocnt + 2'd1;
        end
        if (fo.q && fo_path) begin
          // sr holds I1 Q?.. after this edge: snapshot in time order I0, I1, Q0, Q1
          snap[0] <= sr[2];
          snap[1] <= sr[1];
          snap[2] <= sr[0];
          snap[3] <= fo.d;
          ocnt    <= '0;
          have    <= 1'b1;
        end
      end
    end
  end
endmodule
