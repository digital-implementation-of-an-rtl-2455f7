// Testbench for ps_filter, both sizes. Random 16-QAM symbols drive the 8-symbol
// filter (main channel, gain 131071/2^17) and the 16-symbol filter (adjacent
// channel, gain 0.625). The reference, computed in floating point in the testbench,
// zero-stuffs each symbol stream by 4 and convolves it with the square-root raised
// cosine response (roll-off 0.25, 33 taps; roll-off 0.125 with a Kaiser window of
// beta 4.1, 65 taps), scaled to a centre tap of 1. Checked: 8 output samples per
// symbol in I,Q order; all samples within 6 LSB of the reference at one fixed
// alignment, the same for I and Q and for both sizes: a pipeline delay of 8 samples
// per component (2 symbols) on top of the delay of the filter response itself.
module ps_filter_tb;
  import emu_pkg::*;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  timing_t tim;
  logic    sym_en;
  sym_t    si, sq;
  iqmux_t  d8, d16;
  int checks = 0, failures = 0;
  emu_timing u_tim (.clk, .rst, .tim, .sym_en);
  ps_filter #(.NSYM(8)) dut8 (.clk, .rst, .tim, .sym_i(si), .sym_q(sq), .gain(17'd131071), .dout(d8));
  ps_filter #(.NSYM(16)) dut16 (.clk, .rst, .tim, .sym_i(si), .sym_q(sq), .gain(17'd81920), .dout(d16));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  localparam real PI = 3.14159265358979;

  function automatic real srrc(real t, real a);
    if (t == 0.0) return 1.0 - a + 4.0 * a / PI;
    if ((4.0 * a * t - 1.0) ** 2 < 1e-12 || (4.0 * a * t + 1.0) ** 2 < 1e-12)
      return a / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * a)) +
                               (1.0 - 2.0 / PI) * $cos(PI / (4.0 * a)));
    return ($sin(PI * t * (1.0 - a)) + 4.0 * a * t * $cos(PI * t * (1.0 + a))) /
           (PI * t * (1.0 - (4.0 * a * t) ** 2));
  endfunction

  function automatic real bessel_i0(real x);
    real s = 1.0, term = 1.0;
    for (int k = 1; k < 40; k++) begin
      term = term * (x / 2.0 / real'(k)) ** 2;
      s += term;
    end
    return s;
  endfunction

  real h8 [33], h16 [65];
  real o8 [2][$], o16 [2][$];
  always @(posedge clk) if (!rst) begin
    if (d8.valid)  o8[d8.q].push_back(real'(d8.d));
    if (d16.valid) o16[d16.q].push_back(real'(d16.d));
  end

  // align and compare one output stream with the reference, return the delay found
  function automatic int compare(real o [$], real r [$], int maxl, string name);
    int best;
    best = -1;
    for (int L = 0; L < maxl && best < 0; L++) begin
      int bad = 0;
      for (int j = 200; j < 1000; j++)
        if (o[j] - r[j - L] > 6.0 || r[j - L] - o[j] > 6.0) bad++;
      if (bad == 0) best = L;
    end
    checks++;
    if (best < 0) begin failures++; $display("FAIL %s: no alignment", name); end
    return best;
  endfunction

  initial begin
    real xs [2][$];
    real r8 [2][$], r16 [2][$];
    int L8 [2], L16 [2];
    real mx8, mx16;
    // responses
    mx8 = srrc(0.0, 0.25); mx16 = srrc(0.0, 0.125);
    for (int k = 0; k < 33; k++) h8[k] = srrc(real'(k - 16) / 4.0, 0.25) / mx8;
    for (int k = 0; k < 65; k++)
      h16[k] = srrc(real'(k - 32) / 4.0, 0.125) / mx16 *
               bessel_i0(4.1 * $sqrt(1.0 - (real'(k - 32) / 32.0) ** 2)) / bessel_i0(4.1);
    si = '0; sq = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      // a new symbol each symbol period, stable around the sampling tick
      while (tim.tick != 5'd16) @(negedge clk);
      si = sym_t'(($urandom_range(0, 1) ? 4 : 12) * ($urandom_range(0, 1) ? 1 : -1));
      sq = sym_t'(($urandom_range(0, 1) ? 4 : 12) * ($urandom_range(0, 1) ? 1 : -1));
      xs[0].push_back(real'(si) / 16.0 * 65536.0);
      xs[1].push_back(real'(sq) / 16.0 * 65536.0);
      @(negedge clk);
    end
    chk(o8[0].size() >= 4 * 290 && o8[0].size() <= 4 * 302 && o8[0].size() - o8[1].size() <= 1 && o8[1].size() - o8[0].size() <= 1,
        $sformatf("4 I and 4 Q samples per symbol (%0d)", o8[0].size()));
    chk(o16[0].size() == o8[0].size(), "same rate for both sizes");
    // references
    for (int c = 0; c < 2; c++)
      for (int m = 0; m < 4 * 300; m++) begin
        real a8, a16;
        a8 = 0.0; a16 = 0.0;
        for (int k = 0; k < 65; k++) begin
          int j;
          j = m - k;
          if (j >= 0 && j % 4 == 0) begin
            if (k < 33) a8 += h8[k] * xs[c][j / 4];
            a16 += h16[k] * xs[c][j / 4];
          end
        end
        r8[c].push_back(a8 * 131071.0 / 131072.0);
        r16[c].push_back(a16 * 0.625);
      end
    for (int c = 0; c < 2; c++) begin
      L8[c]  = compare(o8[c], r8[c], 40, "8-symbol filter");
      L16[c] = compare(o16[c], r16[c], 80, "16-symbol filter");
    end
    chk(L8[0] == L8[1] && L16[0] == L16[1], "I and Q aligned");
    chk(L8[0] == 8 && L16[0] == 8, "pipeline delay of 2 symbols");
    for (int c = 0; c < 2; c++)
      for (int j = 100; j < 1100; j++) begin
        chk(o8[c][j] - r8[c][j - L8[c]] <= 6.0 && r8[c][j - L8[c]] - o8[c][j] <= 6.0,
            $sformatf("8-symbol %0d.%0d: %f vs %f", j, c, o8[c][j], r8[c][j - L8[c]]));
        chk(o16[c][j] - r16[c][j - L16[c]] <= 6.0 && r16[c][j - L16[c]] - o16[c][j] <= 6.0,
            $sformatf("16-symbol %0d.%0d", j, c));
      end
    $display("delays: %0d %0d and %0d %0d output samples; counts %0d %0d %0d", L8[0], L8[1], L16[0], L16[1], o8[0].size(), o8[1].size(), o16[0].size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
