// Multiplexed polyphase square-root raised cosine pulse-shaping filter with output
// interleaver.
//
// Input: one mapped symbol (I and Q, 1.4 format) per symbol. Output: the pulse-shaped
// signal at 4 samples/symbol per component, as one multiplexed stream I,Q,I,Q at 8
// samples/symbol (2.16 format, one sample on every ce8 enable).
//
// How it works. The FIR of NSYM symbols (4*NSYM+1 taps) is split into its 4 polyphase
// branches so that no zero-stuffed samples are multiplied. I and Q share the data
// pipeline: it shifts twice per symbol (I in at the end of the second half symbol, Q
// at the end of the first), so that every second register holds I samples during the
// first half symbol and Q samples during the second. Each DSMAC steps through 8 of
// these taps in the 8 clk16 ticks of a half symbol with its own coefficient table and
// so produces one polyphase output for I, then one for Q. NSYM = 8 uses 4 DSMACs (one
// per phase), NSYM = 16 uses 8 (two per phase, summed). The last tap, h[4*NSYM],
// is multiplied by a fifth multiplier that is time-shared with the output gain: in each
// half symbol it forms the last-tap product (tick 7) and multiplies the four phase sums
// by the feedback gain (ticks 1..4). The 8 gained samples of a symbol (4 I, then 4 Q)
// are then reordered I,Q,I,Q by the output buffer.
//
// The branch structure, the number of DSMACs, the time-shared multiplier and the
// output ordering follow the design documentation. Coefficient width (18-bit 1.17),
// the rounding of each sum to 2.16 before the gain and the exact tick of each step are
// this design's choices.
//
// Timing: driven by emu_timing (32 clk ticks per symbol). The symbol on sym_i/sym_q is
// sampled at tick 31. Beyond the delay of the impulse response itself, the output
// stream lags by 2 symbols (8 samples per component). The output starts with an I
// sample once the first buffer has been loaded.
module ps_filter
  import emu_pkg::*;
#(
  parameter int NSYM = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  timing_t     tim,
  input  sym_t        sym_i,
  input  sym_t        sym_q,
  input  logic [16:0] gain,
  output iqmux_t      dout
);
  localparam int NMAC = NSYM / 2;
  localparam int NREG = 2 * NSYM + 1;
  localparam int AW   = 42;

  function automatic logic signed [17:0] coef(logic [6:0] idx);
    if (NSYM == 8) return 18'(COEF_MAIN[idx[5:0]]);
    else           return 18'(COEF_ADJ[idx]);
  endfunction

  logic signed [17:0] pipe [NREG];
  logic signed [17:0] q_hold;
  logic shift_i, shift_q;

  assign shift_i = (tim.tick == 5'd31);
  assign shift_q = (tim.tick == 5'd15);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NREG; k++) pipe[k] <= '0;
      q_hold <= '0;
    end else if (shift_i || shift_q) begin
      // 1.4 symbol zero-padded with 13 LSBs to an 18-bit fraction (1.17)
      pipe[0] <= shift_i ? {sym_i, 13'd0} : q_hold;
      for (int k = 1; k < NREG; k++) pipe[k] <= pipe[k-1];
      if (shift_i) q_hold <= {sym_q, 13'd0};
    end
  end

  // DSMAC bank
  logic signed [AW-1:0] mac_i [NMAC];
  logic signed [AW-1:0] mac_q [NMAC];
  logic first;
  assign first = (tim.sel16 == 3'd0);

  for (genvar m = 0; m < NMAC; m++) begin : g_mac
    localparam int P = m % 4;
    localparam int S = m / 4;
    logic signed [17:0] x, c;
    always_comb begin
      x = pipe[2 * (8 * S + int'(tim.sel16))];
      c = coef(7'(4 * (8 * S + int'(tim.sel16)) + P));
    end
    dsmac #(.XW(18), .CW(18), .AW(AW)) u_mac (
      .clk, .rst, .ce(tim.ce16), .first, .half(tim.half), .x, .c,
      .iout(mac_i[m]), .qout(mac_q[m]));
  end

  // Phase sums of the stream that finished at the start of this half symbol.
  logic signed [AW-1:0] psum [4];
  logic signed [AW-1:0] e_reg, e_hold;
  always_comb begin
    for (int p = 0; p < 4; p++) begin
      psum[p] = '0;
      for (int m = p; m < NMAC; m += 4)
        psum[p] += tim.half ? mac_i[m] : mac_q[m];
    end
    psum[0] += e_hold;
  end

  // Round a 2.34 sum to 2.16 with saturation.
  function automatic logic signed [17:0] to_s18(logic signed [AW-1:0] v);
    logic signed [AW-1:0] r;
    r = (v + AW'(1 <<< 17)) >>> 18;
    if (r > AW'(131071))       return 18'sd131071;
    else if (r < -AW'(131072)) return -18'sd131072;
    else                       return r[17:0];
  endfunction

  // Time-shared multiplier: last tap at sel 7, gain for phases 0..3 at sel 1..4.
  logic signed [17:0] ma, mb;
  logic signed [35:0] mprod;
  logic [1:0] gphase;
  assign gphase = 2'(tim.sel16 - 3'd1);
  always_comb begin
    if (tim.sel16 == 3'd7) begin
      ma = pipe[2 * NSYM];
      mb = coef(7'(4 * NSYM));
    end else begin
      ma = to_s18(psum[gphase]);
      mb = {1'b0, gain};
    end
  end
  assign mprod = ma * mb;

  logic signed [17:0] sbuf [8];   // [half*4 + phase] of the last finished symbol
  logic signed [17:0] obuf [8];
  logic [2:0] ocnt;
  logic       primed;         // first output buffer loaded
  logic       done_half;          // which half the gained samples belong to

  always_ff @(posedge clk) begin
    if (rst) begin
      e_reg <= '0;
      e_hold <= '0;
      for (int k = 0; k < 8; k++) begin
        sbuf[k] <= '0;
        obuf[k] <= '0;
      end
      ocnt <= '0;
      primed <= 1'b0;
      dout <= '0;
    end else begin
      if (tim.ce16) begin
        if (tim.sel16 == 3'd7) e_reg <= AW'(mprod);
        if (tim.sel16 == 3'd0) e_hold <= e_reg;
        if (tim.sel16 >= 3'd1 && tim.sel16 <= 3'd4)
          sbuf[{done_half, gphase}] <= 18'(mprod >>> 17);
      end
      if (tim.tick == 5'd10) begin
        obuf   <= sbuf;
        ocnt   <= '0;
        primed <= 1'b1;
      end
      dout.valid <= tim.ce8 && primed;
      if (tim.ce8 && primed) begin
        dout.q <= ocnt[0];
        dout.d <= obuf[{ocnt[0], ocnt[2:1]}];
        ocnt   <= ocnt + 3'd1;
      end
    end
  end
  // In the first half the Q sums of the previous symbol are gained, in the second the
  // I sums of the current one.
  assign done_half = ~tim.half;
endmodule
