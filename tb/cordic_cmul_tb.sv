// Testbench for cordic_cmul: random complex samples (one every 4 clocks, as at 8
// samples/symbol) are frequency shifted by a random phase increment. The k-th sample
// after reset must come out as (i + jq) * exp(j 2 pi k freq / 2^32), computed in
// floating point, within 4 LSB (the CORDIC gain is compensated inside), 21 clocks
// after it entered; a zero increment must leave the samples unchanged (within 2 LSB).
module cordic_cmul_tb;
  import emu_pkg::*;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  iqpar_t din, dout;
  logic [31:0] freq;
  int checks = 0, failures = 0;
  cordic_cmul dut (.clk, .rst, .din, .freq, .dout);

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
  real ei [$], eq [$], tol [$];
  int cyc, inc [$];
  initial cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (!rst && dout.valid) begin
    real a, b, t;
    int c0;
    a = ei.pop_front(); b = eq.pop_front(); t = tol.pop_front(); c0 = inc.pop_front();
    chk((real'(dout.i) - a) ** 2 + (real'(dout.q) - b) ** 2 <= t * t,
        $sformatf("(%0d,%0d) vs (%f,%f)", dout.i, dout.q, a, b));
    chk(cyc - c0 == 21, $sformatf("latency %0d", cyc - c0));
  end

  initial begin
    din = '0; freq = '0;
    for (int t = 0; t < 3; t++) begin
      freq = (t == 0) ? 32'd0 : $urandom;
      rst = 1'b1; repeat (2) @(negedge clk); rst = 1'b0;
      for (int k = 0; k < 500; k++) begin
        real th, xi, xq;
        din.valid = 1'b1;
        din.i = 18'(int'($urandom_range(0, 100000)) - 50000);
        din.q = 18'(int'($urandom_range(0, 100000)) - 50000);
        th = 2.0 * PI * real'(32'(longint'(k) * longint'(freq))) / 4294967296.0;
        xi = real'(din.i); xq = real'(din.q);
        ei.push_back(xi * $cos(th) - xq * $sin(th));
        eq.push_back(xi * $sin(th) + xq * $cos(th));
        tol.push_back((t == 0) ? 2.0 : 4.0);
        inc.push_back(cyc);
        @(negedge clk);
        din.valid = 1'b0;
        repeat (3) @(negedge clk);
      end
      repeat (30) @(negedge clk);
    end
    chk(ei.size() == 0, "every sample came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
