// Testbench for cordic_demux: a random multiplexed I,Q stream at one sample per two
// clocks must come out as parallel pairs at half that rate (one pair per Q sample,
// one clock after it), each pair holding the I sample and the Q sample of the pair.
module cordic_demux_tb;
  import emu_pkg::*;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  iqmux_t din;
  iqpar_t dout;
  int checks = 0, failures = 0;
  cordic_demux dut (.clk, .rst, .din, .dout);

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
    s18_t ival;
    int pairs;
    din = '0; pairs = 0; ival = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      din.valid = 1'b1; din.q = n[0]; din.d = 18'($urandom);
      if (!din.q) ival = din.d;
      @(negedge clk);
      din.valid = 1'b0;
      chk(dout.valid == n[0], "one pair per Q sample");
      if (dout.valid) begin
        pairs++;
        chk(dout.i == ival && dout.q == din.d, "pair contents");
      end
      @(negedge clk);
      chk(!dout.valid, "valid is one clock");
    end
    chk(pairs == 500, "half rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
