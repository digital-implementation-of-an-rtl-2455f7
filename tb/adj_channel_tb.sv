// Testbench for adj_channel. Three channels share the same seeds: A at zero offset,
// B shifted by a random frequency, C at zero offset with half of A's gain. Checks:
// one complex output every 4 clocks (8 per symbol); B has A's magnitude (to 6 LSB)
// and the phase of B relative to A advances by exactly 2*pi*freq/2^32 per sample;
// C equals A/2 (to 2 LSB); the output carries signal (mean magnitude above 0.05).
module adj_channel_tb;
  import emu_pkg::*;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  timing_t tim;
  logic sym_en;
  logic [2:0] mode;
  logic [16:0] gain;
  logic [31:0] freq;
  iqpar_t a, b, c;
  int checks = 0, failures = 0;

  emu_timing u_t (.clk, .rst, .tim, .sym_en);
  adj_channel ua (.clk, .rst, .tim, .sym_en, .mode, .gain, .freq(32'd0), .dout(a));
  adj_channel ub (.clk, .rst, .tim, .sym_en, .mode, .gain, .freq, .dout(b));
  adj_channel uc (.clk, .rst, .tim, .sym_en, .mode, .gain(gain >> 1), .freq(32'd0), .dout(c));

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

  localparam real PI = 3.14159265358979;

  function automatic real wrap(real x);
    while (x > PI) x -= 2.0 * PI;
    while (x < -PI) x += 2.0 * PI;
    return x;
  endfunction

  task automatic run(logic [2:0] m, logic [16:0] g, logic [31:0] f, int n);
    real re_a, im_a, bi, bq, ma, mb, ph, prev_ph, step, sum_mag, err;
    int last, k;
    bit have_prev;
    rst = 1'b1; mode = m; gain = g; freq = f;
    step = 2.0 * PI * real'($signed(f)) / 4294967296.0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    last = -1; k = 0; have_prev = 0; sum_mag = 0;
    while (k < n) begin
      @(negedge clk);
      last++;
      if (a.valid) begin
        if (k > 0) chk(last == 4, "output every 4 clocks");
        last = 0;
        chk(b.valid && c.valid, "channels in step");
        re_a = real'(a.i); im_a = real'(a.q); bi = real'(b.i); bq = real'(b.q);
        ma = $sqrt(re_a * re_a + im_a * im_a); mb = $sqrt(bi * bi + bq * bq);
        sum_mag += ma;
        err = ma - mb;
        chk(err < 6.0 && err > -6.0, "frequency shift keeps magnitude");
        chk((2 * c.i - a.i) <= 4 && (2 * c.i - a.i) >= -4 &&
            (2 * c.q - a.q) <= 4 && (2 * c.q - a.q) >= -4, "gain scaling");
        if (ma > 4000.0) begin
          ph = $atan2(bq * re_a - bi * im_a, bi * re_a + bq * im_a);
          if (have_prev) chk(wrap(ph - prev_ph - step) < 0.01 &&
                             wrap(ph - prev_ph - step) > -0.01, "phase advance per sample");
          prev_ph = ph; have_prev = 1;
        end else have_prev = 0;
        k++;
      end
    end
    chk(sum_mag / n > 0.05 * 65536.0, "signal present");
  endtask

  initial begin
    mode = MOD_16QAM; gain = '0; freq = '0;
    run(MOD_16QAM, 17'd65536, 32'd671088640, 800);
    run(MOD_64QAM, 17'($urandom_range(131070, 40000)), $urandom, 800);
    run(MOD_QPSK0, 17'd100000, 32'(-32'sd671088640), 800);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
