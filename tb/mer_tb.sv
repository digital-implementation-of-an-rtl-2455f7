// Modulation error ratio of the emulator with no impairments, at the default sizes.
//
// The main channel is set to 64-QAM (slot 0 of profile 1 rewritten through the edit
// port); echoes, adjacent channels and noise are off, so what is left is the error of
// the implementation itself: the 8-symbol pulse-shaping filter, the fixed-point
// arithmetic, the Farrow upsampler and the CORDIC frequency shifter. The testbench acts
// as an ideal receiver: a 33-symbol square-root raised-cosine matched filter
// (roll-off 0.25) at 8 samples per symbol, a search for the symbol timing, and a
// least-squares complex gain. MER = 10 log10(signal energy / error energy) over 3000
// symbols, compared with the 55 dB that the implementation must reach (DOCSIS
// case 2b, 35 dB, plus a 20 dB margin). Also measures the main channel with a
// frequency shift of +1 MHz removed in the receiver, which adds the CORDIC's error.
module mer_tb;
  import emu_pkg::*;
  logic clk;
  initial begin clk = 1'b0; forever #5 clk = ~clk; end

  logic        btn, ed_we, loading, ov;
  logic [3:0]  sw;
  logic [4:0]  ed_addr;
  logic [31:0] ed_wdata;
  logic signed [21:0] oi, oq;

  channel_emulator dut (
    .clk, .button_0(btn), .sw, .dip(3'd0), .ed_we, .ed_prof(2'd0), .ed_addr, .ed_wdata,
    .pre_we(1'b0), .pre_ram(3'd0), .pre_addr(8'd0), .pre_wdata(6'd0), .sym_raddr(16'd0),
    .sym_rdata(), .sym_full(), .cap_raddr(16'd0), .cap_rdata_i(), .cap_rdata_q(), .cap_full(),
    .loading, .preamble_done(), .tx_word(), .out_valid(ov), .out_i(oi), .out_q(oq),
    .hex1(), .hex0(), .ledg0());

  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  localparam int SPAN = 16;                 // matched filter half length, symbols
  localparam int NT = 2 * SPAN * 8 + 1;

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic real srrc(real t, real a);
    if (t == 0.0) return 1.0 - a + 4.0 * a / PI;
    if ((4.0 * a * t - 1.0) ** 2 < 1e-12 || (4.0 * a * t + 1.0) ** 2 < 1e-12)
      return a / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * a)) +
                               (1.0 - 2.0 / PI) * $cos(PI / (4.0 * a)));
    return ($sin(PI * t * (1.0 - a)) + 4.0 * a * t * $cos(PI * t * (1.0 + a))) /
           (PI * t * (1.0 - (4.0 * a * t) ** 2));
  endfunction

  real h [NT];
  real yi [$], yq [$], si [$], sq [$];
  logic sym_d;
  always @(negedge clk) begin
    if (btn || loading) begin
      sym_d = 1'b0;
    end else begin
      if (ov) begin yi.push_back(real'(oi)); yq.push_back(real'(oq)); end
      // the mapped symbol is valid one clock after the symbol enable
      if (sym_d) begin si.push_back(real'(dut.si)); sq.push_back(real'(dut.sq)); end
      sym_d = dut.sym_en;
    end
  end

  // matched filter output at sample n, with the receiver's frequency correction
  function automatic void mf(int n, real w, output real zi, output real zq);
    real c, s;
    zi = 0; zq = 0;
    for (int m = 0; m < NT; m++) begin
      c = $cos(-w * (n - m)); s = $sin(-w * (n - m));
      zi += h[m] * (yi[n - m] * c - yq[n - m] * s);
      zq += h[m] * (yi[n - m] * s + yq[n - m] * c);
    end
  endfunction

  function automatic real mer(int d, int k0, int nsym, real w);
    real gr, gi, ss, zi, zq, er, es, ei, eq;
    real zr_a [], zi_a [];
    zr_a = new[nsym]; zi_a = new[nsym];
    gr = 0; gi = 0; ss = 0;
    for (int k = 0; k < nsym; k++) begin
      mf(8 * (k0 + k) + d, w, zi, zq);
      zr_a[k] = zi; zi_a[k] = zq;
      // z * conj(s)
      gr += zi * si[k0 + k] + zq * sq[k0 + k];
      gi += zq * si[k0 + k] - zi * sq[k0 + k];
      ss += si[k0 + k] ** 2 + sq[k0 + k] ** 2;
    end
    gr /= ss; gi /= ss;
    er = 0; es = 0;
    for (int k = 0; k < nsym; k++) begin
      ei = zr_a[k] - (gr * si[k0 + k] - gi * sq[k0 + k]);
      eq = zi_a[k] - (gr * sq[k0 + k] + gi * si[k0 + k]);
      er += ei * ei + eq * eq;
      es += (gr * gr + gi * gi) * (si[k0 + k] ** 2 + sq[k0 + k] ** 2);
    end
    return 10.0 * $log10(es / er);
  endfunction

  task automatic measure(real w, real target, string name);
    int best_d;
    real best, m;
    best = -100.0; best_d = 0;
    for (int d = 8 * SPAN; d < 8 * SPAN + 8 * 14; d++) begin
      m = mer(d, 60, 200, w);
      if (m > best) begin best = m; best_d = d; end
    end
    m = mer(best_d, 60, 3000, w);
    $display("%s: MER %0.3f dB over 3000 symbols (timing offset %0d samples, frequency word %0d)", name, m, best_d, dut.param[P_MAIN_FREQ]);
    chk(m >= target, name);
  endtask

  initial begin
    for (int m = 0; m < NT; m++) h[m] = srrc(real'(m - SPAN * 8) / 8.0, 0.25);
    btn = 1'b1; sw = 4'b0000; ed_we = 1'b0; ed_addr = '0; ed_wdata = '0;
    repeat (3) @(negedge clk);
    // profile 1: 64-QAM main channel, frequency word in slot 4
    ed_we = 1'b1; ed_addr = 5'(P_MAIN_MODE); ed_wdata = 32'(MOD_64QAM);
    @(negedge clk);
    ed_we = 1'b0;
    repeat (3) @(negedge clk);
    btn = 1'b0;
    while (si.size() < 3400) @(negedge clk);
    measure(0.0, 55.0, "64-QAM, no frequency shift");
    // +1 MHz shift: 2^32 / 40 per output sample
    btn = 1'b1;
    @(negedge clk);
    ed_we = 1'b1; ed_addr = 5'(P_MAIN_FREQ); ed_wdata = 32'd107374182;
    @(negedge clk);
    ed_we = 1'b0;
    yi.delete(); yq.delete(); si.delete(); sq.delete();
    repeat (3) @(negedge clk);
    btn = 1'b0;
    while (si.size() < 3400) @(negedge clk);
    measure(2.0 * PI * 107374182.0 / 4294967296.0, 55.0, "64-QAM, +1 MHz shift");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
