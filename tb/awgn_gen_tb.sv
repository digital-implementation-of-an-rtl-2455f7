// Testbench for awgn_gen: the two noise components must each have standard deviation
// level/2, be uncorrelated with each other (|rho| < 0.05 over 6000 pairs) and arrive
// together, one complex sample every 4 clocks.
module awgn_gen_tb;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  logic [17:0] level;
  logic ov;
  logic signed [21:0] ni, nq;
  int checks = 0, failures = 0;
  awgn_gen dut (.clk, .rst, .level, .out_valid(ov), .noise_i(ni), .noise_q(nq));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    real si, sq, sii, sqq, siq, x, y, vi, vq, rho, sd;
    int n, last, bad;
    si = 0; sq = 0; sii = 0; sqq = 0; siq = 0; n = 0; last = -1; bad = 0;
    level = 18'($urandom_range(131071, 90000));
    sd = real'(level) / 131072.0 / 2.0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (60) @(negedge clk);
    while (n < 6000) begin
      @(negedge clk);
      last++;
      if (ov) begin
        if (n > 0 && last != 4) bad++;
        last = 0;
        x = real'(ni) / 65536.0; y = real'(nq) / 65536.0;
        si += x; sq += y; sii += x * x; sqq += y * y; siq += x * y;
        n++;
      end
    end
    vi = sii / n - (si / n) ** 2;
    vq = sqq / n - (sq / n) ** 2;
    rho = (siq / n - (si / n) * (sq / n)) / $sqrt(vi * vq);
    $display("sd_i %f sd_q %f expected %f rho %f", $sqrt(vi), $sqrt(vq), sd, rho);
    chk(bad == 0, "rate one complex sample per 4 clocks");
    chk($sqrt(vi) > 0.95 * sd && $sqrt(vi) < 1.05 * sd, "I standard deviation");
    chk($sqrt(vq) > 0.95 * sd && $sqrt(vq) < 1.05 * sd, "Q standard deviation");
    chk(rho < 0.05 && rho > -0.05, "I/Q correlation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
