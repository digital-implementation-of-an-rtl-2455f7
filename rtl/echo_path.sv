// One echo path with complex attenuation.
//
// A micro-reflection is a delayed, attenuated and phase-rotated copy of the main
// signal. The multiplexed I,Q stream is delayed by an integer number of complex
// samples (cshift_reg, 0..63), then by a fraction of a sample (frac_delay), and then
// multiplied by the complex gain g = gain_re + j*gain_im (1.17 each). The complex
// product uses two path attenuators, one per gain component, on every sample; when a
// Q sample arrives its I partner's products are still held, so both outputs
//   out_I = gain_re*I - gain_im*Q,   out_Q = gain_re*Q + gain_im*I
// can be formed and sent out in the next two stream slots. The three parameters
// (integer delay, fractional delay, complex attenuation) follow the design
// documentation; the way the complex product is built from two attenuators is this
// design's choice.
//
// Timing: fixed latency ECHO_LAT = 12 stream steps (1 + 8 + 1 + 2) plus the
// programmed delay; output I samples leave in I slots, Q in Q slots.
module echo_path
  import emu_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  iqmux_t             din,
  input  logic [5:0]         int_dly,
  input  logic signed [17:0] frac,
  input  logic signed [17:0] gain_re,
  input  logic signed [17:0] gain_im,
  output iqmux_t             dout
);
  iqmux_t s_int, s_frac, a_re, a_im;

  cshift_reg #(.MAXDLY(63)) u_int (.clk, .rst, .din, .sample_delay(int_dly), .dout(s_int));
  frac_delay u_frac (.clk, .rst, .din(s_int), .delta(frac), .dout(s_frac));
  path_attenuator u_re (.clk, .rst, .path_gain(gain_re), .din(s_frac), .dout(a_re));
  path_attenuator u_im (.clk, .rst, .path_gain(gain_im), .din(s_frac), .dout(a_im));

  // both attenuators see the same strobes; their flags are combined
  logic stb, isq;
  assign stb = a_re.valid & a_im.valid;
  assign isq = a_re.q & a_im.q;

  s18_t re_i, im_i, out_i, out_q;
  logic signed [18:0] ci, cq;
  assign ci = 19'(re_i) - 19'(a_im.d);     // gain_re*I - gain_im*Q
  assign cq = 19'(a_re.d) + 19'(im_i);     // gain_re*Q + gain_im*I

  function automatic s18_t sat(logic signed [18:0] v);
    if (v > 19'sd131071)       return 18'sd131071;
    else if (v < -19'sd131072) return -18'sd131072;
    else                       return v[17:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      re_i <= '0; im_i <= '0; out_i <= '0; out_q <= '0; dout <= '0;
    end else begin
      dout.valid <= stb;
      if (stb) begin
        dout.q <= isq;
        if (!isq) begin
          re_i   <= a_re.d;
          im_i   <= a_im.d;
          dout.d <= out_i;
        end else begin
          out_i  <= sat(ci);
          out_q  <= sat(cq);
          dout.d <= out_q;
        end
      end
    end
  end
endmodule
