// Testbench for multipath: a random complex signal passes the direct path and three
// echoes. The reference, in floating point, is the input plus, for each echo, the
// input delayed by D samples, fractionally delayed by d and multiplied by the complex
// gain. Outputs must match within 8 LSB at a fixed alignment, which shows that the
// direct path is delayed exactly as much as an echo of zero delay. Random echo
// settings are tried after a case with a zero-delay, zero-fraction echo.
module multipath_tb;
  import emu_pkg::*;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  iqmux_t din, dout;
  logic [5:0]         dly [3];
  logic signed [17:0] frac [3], gre [3], gim [3];
  int checks = 0, failures = 0;
  multipath dut (.clk, .rst, .din, .int_dly(dly), .frac, .gain_re(gre), .gain_im(gim), .dout);

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
    real xi [$], xq [$];
    real outs [$];
    bit  oq [$];
    real d, gr, gi, yi, yq, e;
    int  L, k, c, kk, maxd;
    din = '0;
    for (int j = 0; j < 3; j++) begin dly[j] = '0; frac[j] = '0; gre[j] = '0; gim[j] = '0; end
    L = 10;
    for (int t = 0; t < 6; t++) begin
      maxd = 0;
      for (int j = 0; j < 3; j++) begin
        if (t == 0) begin
          dly[j] = '0; frac[j] = '0; gre[j] = (j == 0) ? 18'sd65536 : 18'sd0; gim[j] = '0;
        end else begin
          dly[j]  = 6'($urandom_range(0, 63));
          frac[j] = 18'(int'($urandom_range(0, 131072)) - 65536);
          gre[j]  = 18'(int'($urandom_range(0, 80000)) - 40000);
          gim[j]  = 18'(int'($urandom_range(0, 80000)) - 40000);
        end
        if (int'(dly[j]) > maxd) maxd = int'(dly[j]);
      end
      xi.delete(); xq.delete(); outs.delete(); oq.delete();
      rst = 1'b1; repeat (2) @(negedge clk); rst = 1'b0;
      for (int n = 0; n < 500; n++) begin
        din.valid = 1'b1; din.q = n[0]; din.d = 18'(int'($urandom_range(0, 32767)) - 16384);
        if (n[0]) xq.push_back(real'(din.d)); else xi.push_back(real'(din.d));
        @(negedge clk);
        din.valid = 1'b0;
        if (dout.valid) begin outs.push_back(real'(dout.d)); oq.push_back(dout.q); end
        @(negedge clk);
        if (dout.valid) begin outs.push_back(real'(dout.d)); oq.push_back(dout.q); end
      end
      for (int m = L + 2 * maxd + 8; m < outs.size(); m++) begin
        k = (m - L) / 2; c = (m - L) % 2;
        e = (c == 0) ? xi[k] : xq[k];
        for (int j = 0; j < 3; j++) begin
          d = real'(frac[j]) / 131072.0;
          gr = real'(gre[j]) / 131072.0; gi = real'(gim[j]) / 131072.0;
          kk = k - int'(dly[j]);
          yi = xi[kk] + d / 2.0 * (xi[kk-1] - xi[kk+1]) + d * d / 2.0 * (xi[kk+1] - 2.0 * xi[kk] + xi[kk-1]);
          yq = xq[kk] + d / 2.0 * (xq[kk-1] - xq[kk+1]) + d * d / 2.0 * (xq[kk+1] - 2.0 * xq[kk] + xq[kk-1]);
          e += (c == 0) ? gr * yi - gi * yq : gr * yq + gi * yi;
        end
        chk(outs[m] - e <= 8.0 && e - outs[m] <= 8.0 && oq[m] == (c == 1),
            $sformatf("case %0d step %0d: %f vs %f", t, m, outs[m], e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
