// Testbench for emu_timing: checks every enable and count against a reference tick
// counter over 20 symbols, and the rates (16, 8 and 1 pulses per 32 clocks).
module emu_timing_tb;
  import emu_pkg::*;
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  timing_t tim;
  logic    sym_en;
  int checks = 0, failures = 0;
  emu_timing dut (.clk, .rst, .tim, .sym_en);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int ref_tick, n16, n8, n1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    ref_tick = 0; n16 = 0; n8 = 0; n1 = 0;
    @(negedge clk);
    for (int c = 0; c < 640; c++) begin
      chk(tim.tick == 5'(ref_tick), "tick");
      chk(tim.ce16 == (ref_tick % 2 == 0), "ce16");
      chk(tim.ce8 == (ref_tick % 4 == 0), "ce8");
      chk(sym_en == (ref_tick == 0), "sym_en");
      chk(tim.sel16 == 3'((ref_tick / 2) % 8), "sel16");
      chk(tim.half == (ref_tick >= 16), "half");
      n16 += int'(tim.ce16); n8 += int'(tim.ce8); n1 += int'(sym_en);
      ref_tick = (ref_tick + 1) % 32;
      @(negedge clk);
    end
    chk(n16 == 320, "16 per symbol");
    chk(n8 == 160, "8 per symbol");
    chk(n1 == 20, "1 per symbol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
