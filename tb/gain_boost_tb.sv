// Testbench for gain_boost: for all eight DIP settings and random samples the output
// must be the sample times 1, 2, 4 or 8 (+0/6/12/18 dB, highest switch wins), widened
// to 22 bits, one clock after the input.
module gain_boost_tb;
  import emu_pkg::*;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  logic [2:0] dip;
  iqpar_t din;
  logic ov;
  logic signed [21:0] oi, oq;
  int checks = 0, failures = 0;
  gain_boost dut (.clk, .rst, .dip, .din, .out_valid(ov), .out_i(oi), .out_q(oq));

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
    int m;
    din = '0; dip = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 800; n++) begin
      dip = 3'(n % 8);
      m = dip[2] ? 8 : dip[1] ? 4 : dip[0] ? 2 : 1;
      din.valid = 1'b1; din.i = 18'($urandom); din.q = 18'($urandom);
      @(negedge clk);
      din.valid = 1'b0;
      chk(ov && int'(oi) == m * int'(din.i) && int'(oq) == m * int'(din.q),
          $sformatf("dip %b", dip));
      @(negedge clk);
      chk(!ov, "valid one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
