// Testbench for lfsr: the 3-stage example (s2 xor s3 into s1, seed 101) must run
// through 101,110,111,011,001,100,010 (written s1 s2 s3) and repeat after 7 steps;
// a 5-stage maximal register (taps 5,3) is compared with a reference model for 100
// steps and must have period 31; en low must hold the state.
module lfsr_tb;
  logic clk, rst, en;
  initial begin clk = 1'b0; rst = 1'b1; en = 1'b0; forever #5 clk = ~clk; end
  int checks = 0, failures = 0;
  logic o3, o5;
  lfsr #(.LEN(3), .TAPS(3'b110)) dut3 (.clk, .rst, .en, .seed(3'b101), .bit_out(o3));
  lfsr #(.LEN(5), .TAPS(5'b10100)) dut5 (.clk, .rst, .en, .seed(5'b00001), .bit_out(o5));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // words printed s1 first: "101" means s1=1, s2=0, s3=1
  function automatic logic [2:0] w(string s);
    return {s[2] == "1", s[1] == "1", s[0] == "1"};   // {s3, s2, s1}
  endfunction

  initial begin
    automatic string seq [7] = '{"101", "110", "111", "011", "001", "100", "010"};
    logic [4:0] m5;
    int period;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    for (int k = 0; k < 14; k++) begin
      chk(dut3.state == w(seq[k % 7]), $sformatf("3-bit step %0d", k));
      chk(o3 == dut3.state[2], "bit_out is s3");
      en = 1'b1; @(negedge clk); en = 1'b0;
    end
    // hold
    begin
      logic [2:0] s;
      s = dut3.state;
      repeat (3) @(negedge clk);
      chk(dut3.state == s, "hold when en low");
    end
    // 5-bit maximal register against a model, period 31
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    m5 = 5'b00001;
    period = 0;
    for (int k = 0; k < 100; k++) begin
      chk(dut5.state == m5, $sformatf("5-bit step %0d", k));
      chk(o5 == m5[4], "5-bit out");
      m5 = {m5[3:0], m5[4] ^ m5[2]};
      en = 1'b1; @(negedge clk); en = 1'b0;
      if (period == 0 && dut5.state == 5'b00001) period = k + 1;
    end
    chk(period == 31, "period 31");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
