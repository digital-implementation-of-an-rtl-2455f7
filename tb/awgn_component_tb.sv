// Testbench for awgn_component: statistical checks on 8000 noise samples at full
// level (1.0) and 4000 at half level. Expected, from the Box-Muller construction and
// averaging of four unit-variance samples: mean 0, standard deviation level/2,
// kurtosis 3 (Gaussian), no correlation between neighbouring samples, and no sample
// beyond 5.5 standard deviations. Rate: exactly one sample every 4 clocks.
module awgn_component_tb;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  logic [17:0] level;
  logic ov;
  logic signed [21:0] noise;
  int checks = 0, failures = 0;
  awgn_component dut (.clk, .rst, .level, .out_valid(ov), .noise);

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

  task automatic measure(int n, real sd_exp);
    real s1, s2, s4, sc, prev, x, m, v, k, r, mx;
    int last, gaps_bad;
    s1 = 0; s2 = 0; s4 = 0; sc = 0; prev = 0; mx = 0; last = -1; gaps_bad = 0;
    for (int i = 0; i < n; ) begin
      @(negedge clk);
      last++;
      if (ov) begin
        if (i > 0 && last != 4) gaps_bad++;
        last = 0;
        x = real'(noise) / 65536.0;
        s1 += x; s2 += x * x; s4 += x ** 4; sc += x * prev; prev = x;
        if ((x < 0 ? -x : x) > mx) mx = (x < 0 ? -x : x);
        i++;
      end
    end
    m = s1 / n; v = s2 / n - m * m; k = (s4 / n) / (v * v); r = (sc / n) / v;
    $display("mean %f sd %f (expected %f) kurtosis %f lag-1 corr %f max %f", m, $sqrt(v),
             sd_exp, k, r, mx);
    chk(gaps_bad == 0, "one sample every 4 clocks");
    chk(m < 0.03 * sd_exp * 4.0 && m > -0.03 * sd_exp * 4.0, "mean");
    chk($sqrt(v) > 0.95 * sd_exp && $sqrt(v) < 1.05 * sd_exp, "standard deviation");
    chk(k > 2.75 && k < 3.25, "kurtosis");
    chk(r < 0.05 && r > -0.05, "lag-1 correlation");
    chk(mx < 5.5 * sd_exp, "range");
  endtask

  initial begin
    level = 18'd131071;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (60) @(negedge clk);
    measure(8000, 0.5);
    level = 18'd65536;
    repeat (20) @(negedge clk);
    measure(4000, 0.25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
