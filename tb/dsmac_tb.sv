// Testbench for dsmac: random 18-bit samples and coefficients in runs of 8 products
// with the half flag alternating; each I or Q sum must appear on its output exactly
// when the first product of the following run is accumulated (one clock later), and
// must equal the sum worked out in the testbench. Idle clocks (ce low) are inserted.
module dsmac_tb;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  logic ce, first, half;
  logic signed [17:0] x, c;
  logic signed [39:0] iout, qout;
  int checks = 0, failures = 0;
  dsmac dut (.clk, .rst, .ce, .first, .half, .x, .c, .iout, .qout);

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
    longint sum, prev_sum;
    prev_sum = 0;
    ce = 0; first = 0; half = 0; x = 0; c = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int run = 0; run < 200; run++) begin
      half = run[0];
      sum = 0;
      for (int k = 0; k < 8; k++) begin
        x = 18'($urandom); c = 18'($urandom);
        first = (k == 0); ce = 1'b1;
        sum += longint'(x) * longint'(c);
        @(negedge clk);
        if (k == 0 && run > 0) begin
          // previous run's sum transferred with this first product
          if (half) chk(iout == 40'(prev_sum), $sformatf("iout run %0d", run - 1));
          else      chk(qout == 40'(prev_sum), $sformatf("qout run %0d", run - 1));
        end
        ce = 1'b0;
        @(negedge clk);               // ce runs at half the clock rate
      end
      prev_sum = sum;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
