// Testbench for load_params. Checks: load_pulse is high from reset for 32 address
// steps (64 clocks at the 16x rate) and then falls; the default profiles hold the
// documented modes, preamble length, adjacent-channel offsets and noise levels; every
// parameter register equals the selected profile word after one scan; random edits
// through the edit port reach the registers within one scan (70 clocks) when their
// profile is selected and never when it is not; a profile switch takes effect
// within one scan.
module load_params_tb;
  import emu_pkg::*;
  logic clk, rst, ce16, ed_we, lp;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  logic [1:0] sw, ed_prof;
  logic [4:0] ed_addr;
  logic [31:0] ed_wdata;
  logic [31:0] param [NSLOT];
  logic [31:0] model [4][32];
  int checks = 0, failures = 0;

  load_params dut (.clk, .rst, .ce16, .sw, .ed_we, .ed_prof, .ed_addr, .ed_wdata, .param,
                   .load_pulse(lp));

  always @(posedge clk) ce16 <= rst ? 1'b0 : ~ce16;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic check_all(string what);
    int bad;
    bad = 0;
    for (int s = 0; s < NSLOT; s++) if (param[s] !== model[sw][s]) bad++;
    chk(bad == 0, what);
  endtask

  initial begin
    int n;
    ce16 = 1'b0; ed_we = 1'b0; ed_prof = '0; ed_addr = '0; ed_wdata = '0;
    sw = 2'd2;
    for (int p = 0; p < 4; p++)
      for (int a = 0; a < 32; a++) model[p][a] = dut.ram[p][a];
    // documented default settings
    chk(model[0][P_MAIN_MODE] == 32'(MOD_QPSK1) && model[1][P_MAIN_MODE] == 32'(MOD_16QAM) &&
        model[2][P_MAIN_MODE] == 32'(MOD_64QAM) && model[3][P_MAIN_MODE] == 32'(MOD_32QAM),
        "default main modes");
    for (int p = 0; p < 4; p++) begin
      chk(model[p][P_PRE_LEN] == 32, "default preamble length");
      chk(model[p][P_ADJ1_FREQ] == 32'd671088640 && model[p][P_ADJ2_FREQ] == 32'hD8000000,
          "adjacent channels at +/-6.25 MHz");
      chk(model[p][P_ECHO_BASE + 8] <= 63, "echo delay within 63 samples");
    end
    chk(model[0][P_NOISE_LEVEL] == 26214 && model[3][P_NOISE_LEVEL] == 6554, "noise levels");
    repeat (3) @(negedge clk);
    rst = 1'b0;
    n = 0;
    while (lp && n < 200) begin @(negedge clk); n++; end
    chk(n >= 62 && n <= 68, "load_pulse length");
    $display("load_pulse lasted %0d clocks", n);
    check_all("registers after load");
    for (int k = 0; k < 60; k++) begin
      int p, a;
      logic [31:0] v;
      p = $urandom_range(3); a = $urandom_range(NSLOT - 1); v = $urandom;
      @(negedge clk);
      ed_we = 1'b1; ed_prof = 2'(p); ed_addr = 5'(a); ed_wdata = v;
      @(negedge clk);
      ed_we = 1'b0;
      model[p][a] = v;
      if (k % 5 == 4) sw = 2'($urandom_range(3));
      repeat (70) @(negedge clk);
      check_all("registers follow edit / profile switch within one scan");
      chk(!lp, "load_pulse stays low");
    end
    // a reset restarts the load
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    chk(lp, "load_pulse after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
