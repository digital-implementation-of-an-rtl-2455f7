// Testbench for echo_path: a random complex signal (multiplexed I,Q stream, one sample
// every second clock) passes one echo with several integer delays, fractional delays
// and complex gains. The reference, worked out in floating point, delays the complex
// signal by D samples, applies the three-tap fractional delay and multiplies by the
// complex gain (gr + j gi)(I + j Q). Every output must match within 5 LSB (truncations), with the
// I/Q tags in order, at a fixed latency: the n-th output after reset belongs to
// complex sample (n - 10)/2 - D (the echo path latency is 12 stream steps and each
// output leaves two clocks, one step, after the input it was computed with).
module echo_path_tb;
  import emu_pkg::*;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  iqmux_t din, dout;
  logic [5:0] dly;
  logic signed [17:0] frac, gre, gim;
  int checks = 0, failures = 0;
  echo_path dut (.clk, .rst, .din, .int_dly(dly), .frac, .gain_re(gre), .gain_im(gim), .dout);

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

  initial begin
    real xi [$], xq [$];      // complex input samples
    real outs [$];
    bit  oq [$];
    int  dls [5] = '{0, 1, 5, 20, 63};
    real d, gr, gi, yi, yq, e;
    int  L, k, c;
    din = '0; dly = '0; frac = '0; gre = '0; gim = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    foreach (dls[t]) begin
      dly  = 6'(dls[t]);
      frac = (t == 0) ? 18'sd0 : 18'(int'($urandom_range(0, 131072)) - 65536);
      gre  = 18'(int'($urandom_range(0, 180000)) - 90000);
      gim  = (t == 1) ? 18'sd0 : 18'(int'($urandom_range(0, 180000)) - 90000);
      d = real'(frac) / 131072.0; gr = real'(gre) / 131072.0; gi = real'(gim) / 131072.0;
      xi.delete(); xq.delete(); outs.delete(); oq.delete();
      rst = 1'b1; repeat (2) @(negedge clk); rst = 1'b0;
      for (int n = 0; n < 600; n++) begin
        din.valid = 1'b1; din.q = n[0]; din.d = 18'(int'($urandom_range(0, 32767)) - 16384);
        if (n[0]) xq.push_back(real'(din.d)); else xi.push_back(real'(din.d));
        @(negedge clk);
        din.valid = 1'b0;
        if (dout.valid) begin outs.push_back(real'(dout.d)); oq.push_back(dout.q); end
        @(negedge clk);
        if (dout.valid) begin outs.push_back(real'(dout.d)); oq.push_back(dout.q); end
      end
      L = 10;
      for (int m = L + 2 * dls[t] + 8; m < outs.size(); m++) begin
        k = (m - L) / 2 - dls[t]; c = (m - L) % 2;      // complex sample, component
        yi = xi[k] + d / 2.0 * (xi[k-1] - xi[k+1]) + d * d / 2.0 * (xi[k+1] - 2.0 * xi[k] + xi[k-1]);
        yq = xq[k] + d / 2.0 * (xq[k-1] - xq[k+1]) + d * d / 2.0 * (xq[k+1] - 2.0 * xq[k] + xq[k-1]);
        e = (c == 0) ? gr * yi - gi * yq : gr * yq + gi * yi;
        chk(outs[m] - e <= 5.0 && e - outs[m] <= 5.0 && oq[m] == (c == 1),
            $sformatf("D=%0d step %0d: %f vs %f", dls[t], m, outs[m], e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
