// Testbench for out_capture (depth 64): random samples are offered with gaps; the
// first 64 valid samples must be stored in order, full must rise after the 64th and
// later samples must not overwrite anything; a reset restarts the capture.
module out_capture_tb;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  logic v;
  logic signed [21:0] di, dq, ri, rq;
  logic [5:0] ra;
  logic full;
  int checks = 0, failures = 0;
  out_capture #(.DEPTH(64)) dut (.clk, .rst, .in_valid(v), .in_i(di), .in_q(dq),
                                 .raddr(ra), .rdata_i(ri), .rdata_q(rq), .full);

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

  initial begin
    logic signed [21:0] ei [64], eq [64];
    v = 0; di = 0; dq = 0; ra = 0;
    for (int pass = 0; pass < 2; pass++) begin
      rst = 1'b1;
      repeat (2) @(negedge clk);
      rst = 1'b0;
      chk(!full, "empty after reset");
      for (int n = 0; n < 100; n++) begin
        v = 1'b1; di = 22'($urandom); dq = 22'($urandom);
        if (n < 64) begin ei[n] = di; eq[n] = dq; end
        @(negedge clk);
        v = 1'b0;
        chk(full == (n >= 63), $sformatf("full after %0d", n + 1));
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      for (int a = 0; a < 64; a++) begin
        ra = 6'(a);
        @(negedge clk);
        chk(ri == ei[a] && rq == eq[a], $sformatf("word %0d", a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
