// Testbench for ln_unit: random and edge 0.18 fractions, one per clock; every result
// must be within 2 LSB (2^-14) of |ln(y)| computed in floating point, and the first
// result must appear exactly 20 clocks after its input.
module ln_unit_tb;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  logic iv, ov;
  logic [17:0] y, lnv;
  int checks = 0, failures = 0;
  ln_unit dut (.clk, .rst, .in_valid(iv), .y_in(y), .out_valid(ov), .ln_out(lnv));

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

  logic [17:0] q [$];
  int cyc, outs, worst;
  initial begin cyc = 0; outs = 0; worst = 0; end
  always @(negedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (ov) begin
      logic [17:0] a;
      real e;
      int d;
      a = q.pop_front();
      e = -$ln(real'((a == 0) ? 1 : a) / 262144.0) * 16384.0;
      d = int'(real'(lnv) - e);
      if (d < 0) d = -d;
      if (d > worst) worst = d;
      chk(d <= 2, $sformatf("ln(%0d): %0d vs %f", a, lnv, e));
      outs <= outs + 1;
    end
  end

  initial begin
    int c0;
    iv = 0; y = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      iv = 1'b1;
      y = (n == 0) ? 18'd1 : (n == 1) ? 18'h3FFFF : (n == 2) ? 18'h20000 : 18'($urandom);
      q.push_back(y);
      if (n == 0) c0 = cyc;
      @(negedge clk);
      if (n < 25 && ov && outs == 0) chk(cyc - c0 == 20, $sformatf("latency %0d", cyc - c0));
    end
    iv = 1'b0;
    repeat (30) @(negedge clk);
    chk(outs == 1000, "one result per input");
    $display("worst error %0d LSB", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
