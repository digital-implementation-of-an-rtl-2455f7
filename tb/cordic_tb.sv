// Testbench for cordic: random vectors (2.16) and random angles (a full turn = 2^32),
// one per clock. Each result must be within 4 LSB of K times the counter-clockwise
// rotation worked out in floating point (K = 1.6467602581), and the first result
// must appear exactly 20 clocks (18 stages + 2) after its input.
module cordic_tb;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  logic iv, ov;
  logic signed [17:0] xi, yi;
  logic [31:0] th;
  logic signed [19:0] xo, yo;
  int checks = 0, failures = 0;
  cordic dut (.clk, .rst, .in_valid(iv), .x_in(xi), .y_in(yi), .theta(th),
              .out_valid(ov), .x_out(xo), .y_out(yo));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  localparam real K = 1.6467602581;
  localparam real PI = 3.14159265358979;
  real qx [$], qy [$];
  int cyc, outs;
  real worst;
  initial begin cyc = 0; outs = 0; worst = 0.0; end
  always @(negedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (ov) begin
      real ex, ey, d;
      ex = qx.pop_front(); ey = qy.pop_front();
      d = (real'(xo) - ex) ** 2 + (real'(yo) - ey) ** 2;
      d = $sqrt(d);
      if (d > worst) worst = d;
      chk(d <= 4.0, $sformatf("rotation: (%0d,%0d) vs (%f,%f)", xo, yo, ex, ey));
      outs <= outs + 1;
    end
  end

  initial begin
    int c0;
    real a;
    iv = 0; xi = 0; yi = 0; th = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      iv = 1'b1;
      // keep |(x,y)| * K below the 4.16 range
      xi = 18'(int'($urandom_range(0, 140000)) - 70000);
      yi = 18'(int'($urandom_range(0, 140000)) - 70000);
      th = (n < 8) ? 32'(n) << 29 : $urandom;
      a = real'(th) / 4294967296.0 * 2.0 * PI;
      qx.push_back(K * (real'(xi) * $cos(a) - real'(yi) * $sin(a)));
      qy.push_back(K * (real'(xi) * $sin(a) + real'(yi) * $cos(a)));
      if (n == 0) c0 = cyc;
      @(negedge clk);
      if (n < 25 && ov && outs == 0) chk(cyc - c0 == 20, $sformatf("latency %0d", cyc - c0));
    end
    iv = 1'b0;
    repeat (30) @(negedge clk);
    chk(outs == 2000, "one result per input");
    $display("worst error %f LSB", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
