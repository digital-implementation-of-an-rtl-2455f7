// Testbench for sqrt_unit: random and edge 4.14 arguments, one per clock; every
// result must equal the integer square root of arg * 2^18 (the exact 2.16 root,
// truncated) and appear exactly 19 clocks after its argument.
module sqrt_unit_tb;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  logic iv, ov;
  logic [17:0] arg, root;
  int checks = 0, failures = 0;
  sqrt_unit dut (.clk, .rst, .in_valid(iv), .arg, .out_valid(ov), .root);

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

  function automatic longint isqrt(longint n);
    longint r = 0;
    while ((r + 1) * (r + 1) <= n) r++;
    return r;
  endfunction

  function automatic longint isqrt_fast(longint n);
    longint r;
    r = longint'($sqrt(real'(n)));
    while (r * r > n) r--;
    while ((r + 1) * (r + 1) <= n) r++;
    return r;
  endfunction

  logic [17:0] q [$];
  int cyc, outs;
  initial begin cyc = 0; outs = 0; end
  always @(negedge clk) if (!rst) begin
    cyc++;
    if (ov) begin
      logic [17:0] a;
      a = q.pop_front();
      chk(longint'(root) == isqrt_fast(longint'(a) << 18), $sformatf("sqrt(%0d)", a));
      outs++;
    end
  end

  initial begin
    iv = 0; arg = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    chk(isqrt(1000) == isqrt_fast(1000), "reference");
    for (int n = 0; n < 1000; n++) begin
      iv = 1'b1;
      arg = (n == 0) ? 18'd0 : (n == 1) ? 18'h3FFFF : (n == 2) ? 18'd16384 : 18'($urandom);
      q.push_back(arg);
      if (n == 0) begin
        // latency: first result exactly 19 clocks later
        fork begin
          int c0;
          c0 = cyc;
          @(negedge clk);
          while (!ov) @(negedge clk);
          chk(cyc - c0 == 19, $sformatf("latency %0d", cyc - c0));
        end join_none
      end
      @(negedge clk);
    end
    iv = 1'b0;
    repeat (25) @(negedge clk);
    chk(outs == 1000, "one result per argument");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
