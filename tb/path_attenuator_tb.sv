// Testbench for path_attenuator: random 2.16 samples times random 1.17 gains, plus
// the extreme values; each output must equal floor(gain * sample / 2^17) (truncation)
// limited to the 2.16 range, one clock after the input, with the tag kept.
module path_attenuator_tb;
  import emu_pkg::*;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  iqmux_t din, dout;
  logic signed [17:0] g;
  int checks = 0, failures = 0;
  path_attenuator dut (.clk, .rst, .path_gain(g), .din, .dout);

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
    longint p, e;
    din = '0; g = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      case (n)
        0: begin g = -18'sd131072; din.d = -18'sd131072; end
        1: begin g = 18'sd131071;  din.d = 18'sd131071;  end
        2: begin g = -18'sd131072; din.d = 18'sd131071;  end
        default: begin g = 18'($urandom); din.d = 18'($urandom); end
      endcase
      din.valid = 1'b1; din.q = n[0];
      p = longint'(g) * longint'(din.d);
      e = p >>> 17;                       // floor
      if (e > 131071) e = 131071;
      @(negedge clk);
      din.valid = 1'b0;
      chk(dout.valid && dout.q == n[0] && longint'(dout.d) == e,
          $sformatf("%0d: %0d*%0d -> %0d, expected %0d", n, g, din.d, dout.d, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
