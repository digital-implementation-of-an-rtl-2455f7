// Testbench for cshift_reg: a multiplexed I,Q stream of random samples (one sample
// every second clock) passes through for integer delays 0, 1, 2, 17 and 63 complex
// samples; each output must equal the input sample of the same component that many
// complex samples earlier, with one stream step of latency, and keep its I/Q tag.
module cshift_reg_tb;
  import emu_pkg::*;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  iqmux_t din, dout;
  logic [5:0] dly;
  int checks = 0, failures = 0;
  cshift_reg dut (.clk, .rst, .din, .sample_delay(dly), .dout);

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
    s18_t hist [$];
    int dl [5] = '{0, 1, 2, 17, 63};
    din = '0; dly = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    foreach (dl[t]) begin
      dly = 6'(dl[t]);
      for (int n = 0; n < 400; n++) begin
        din.valid = 1'b1; din.q = n[0]; din.d = 18'($urandom);
        hist.push_back(din.d);
        @(negedge clk);
        din.valid = 1'b0;
        chk(dout.valid && dout.q == n[0], "valid/q");
        // after 2*dl+1 previous inputs history is full (settled after 130 samples)
        if (n >= 130)
          chk(dout.d == hist[hist.size() - 1 - 2 * dl[t]],
              $sformatf("delay %0d sample %0d", dl[t], n));
        @(negedge clk);
        chk(!dout.valid, "one output per input");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
