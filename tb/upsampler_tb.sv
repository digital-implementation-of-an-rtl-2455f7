// Testbench for upsampler. Input: a multiplexed I,Q stream at one sample every four
// clocks (8 samples/symbol per component). Reference, in floating point and per
// component: path 0 is x[n-2]; path 1 is two cascaded first-order allpass sections
// y = a (x - y[n-1]) + x[n-1] with a0 = 0.4854569, a1 = -0.0720920; each input sample
// produces output samples 2n (path 0) and 2n+1 (path 1). Checked: the output is an
// I,Q,I,Q stream at twice the input rate; every output matches the reference within
// 2 LSB at one fixed alignment (found once, then held for the whole run); a constant
// input comes out as the same constant at every output (no images at DC).
module upsampler_tb;
  import emu_pkg::*;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  iqmux_t din, dout;
  int checks = 0, failures = 0;
  upsampler dut (.clk, .rst, .din, .dout);

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

  real outs [$];
  bit  oq [$];
  int  ncyc, nout;
  initial begin ncyc = 0; nout = 0; end
  always @(posedge clk) if (!rst) begin
    ncyc <= ncyc + 1;
    if (dout.valid) begin outs.push_back(real'(dout.d)); oq.push_back(dout.q); nout <= nout + 1; end
  end

  localparam real A0 = 0.4854569008708127, A1 = -0.07209196329829355;

  initial begin
    real x [2][$], m [2][$];          // per component input and reference output
    real s1 [2], s2 [2], x1 [2], y1 [2], y2 [2];
    int L, best, bad, n0, c0;
    din = '0;
    for (int c = 0; c < 2; c++) begin s1[c] = 0; s2[c] = 0; x1[c] = 0; y1[c] = 0; y2[c] = 0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    n0 = nout; c0 = ncyc;
    for (int n = 0; n < 1200; n++) begin
      int c;
      real xv;
      c = n % 2;
      din.valid = 1'b1; din.q = n[0];
      din.d = (n >= 1000) ? 18'sd30000 : 18'(int'($urandom_range(0, 100000)) - 50000);
      xv = real'(din.d);
      x[c].push_back(xv);
      // reference
      s1[c] = A0 * (xv - y1[c]) + x1[c];
      s2[c] = A1 * (s1[c] - y2[c]) + y1[c];
      m[c].push_back((x[c].size() >= 3) ? x[c][x[c].size() - 3] : 0.0);
      m[c].push_back(s2[c]);
      x1[c] = xv; y1[c] = s1[c]; y2[c] = s2[c];
      @(negedge clk);
      din.valid = 1'b0;
      repeat (3) @(negedge clk);
    end
    chk(nout - n0 >= 2 * 1200 - 16 && nout - n0 <= 2 * 1200, "twice the input rate");
    // alignment: output complex sample j = reference sample j - L
    best = -1;
    for (L = 0; L < 12 && best < 0; L++) begin
      bad = 0;
      for (int j = 20; j < 900; j++)
        for (int c = 0; c < 2; c++) begin
          real e;
          e = m[c][j - L];
          if (outs[2 * j + c] - e > 2.0 || e - outs[2 * j + c] > 2.0) bad++;
        end
      if (bad == 0) best = L;
    end
    chk(best >= 0, "an alignment exists");
    if (best < 0) best = 0;
    for (int j = 20; j < 1190; j++)
      for (int c = 0; c < 2; c++) begin
        real e;
        e = m[c][j - best];
        chk(outs[2 * j + c] - e <= 2.0 && e - outs[2 * j + c] <= 2.0 && oq[2 * j + c] == c[0],
            $sformatf("output %0d.%0d: %f vs %f", j, c, outs[2 * j + c], e));
      end
    for (int j = 2150; j < 2380; j++)
      chk(outs[j] >= 29998.0 && outs[j] <= 30002.0, $sformatf("DC passes unchanged %0d: %f", j, outs[j]));
    $display("alignment %0d complex samples", best);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
