// Testbench for frac_delay: a random multiplexed I,Q stream (one sample every second
// clock, |x| < 0.5) is filtered with several fractional delays. The reference is the
// three-tap maximally flat interpolator worked out in floating point,
//   y[n] = x[n-1] + D/2 (x[n-2] - x[n]) + D^2/2 (x[n] - 2 x[n-1] + x[n-2]),
// per component. Outputs must match within 2 LSB, with a latency of exactly 8 stream
// steps (half a symbol) from x[n-1] to y[n], and keep their I/Q tag.
module frac_delay_tb;
  import emu_pkg::*;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  iqmux_t din, dout;
  logic signed [17:0] delta;
  int checks = 0, failures = 0;
  frac_delay dut (.clk, .rst, .din, .delta, .dout);

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
    real xs [$];          // stream inputs, in steps
    real outs [$];
    bit  oq [$];
    int  dl [6];
    real dr, e, xa, xb, xc;
    int  err;
    dl = '{0, 65536, -65536, 32768, -98304, 0};
    din = '0; delta = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 6; t++) begin
      delta = (t == 5) ? 18'(int'($urandom_range(0, 131072)) - 65536) : 18'(dl[t]);
      dr = real'(delta) / 131072.0;
      xs.delete(); outs.delete(); oq.delete();
      for (int n = 0; n < 400; n++) begin
        din.valid = 1'b1; din.q = n[0]; din.d = 18'(int'($urandom_range(0, 65535)) - 32768);
        xs.push_back(real'(din.d));
        @(negedge clk);
        din.valid = 1'b0;
        if (dout.valid) begin outs.push_back(real'(dout.d)); oq.push_back(dout.q); end
        @(negedge clk);
      end
      // output step m corresponds to the centre input step m - 8
      err = 0;
      for (int m = 20; m < outs.size(); m++) begin
        xa = xs[m - 6]; xb = xs[m - 8]; xc = xs[m - 10];
        e = xb + dr / 2.0 * (xc - xa) + dr * dr / 2.0 * (xa - 2.0 * xb + xc);
        chk(outs[m] - e <= 2.0 && e - outs[m] <= 2.0 && oq[m] == m[0],
            $sformatf("delta %f step %0d: %f vs %f", dr, m, outs[m], e));
      end
      if (t == 0)
        for (int m = 20; m < outs.size(); m++)
          chk(outs[m] == xs[m - 8], "zero delay is a pure 8-step delay");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
