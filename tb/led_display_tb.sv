// Testbench for led_display: for all 16 switch settings the two digits must read
// "P" and the profile number 1..4 (segments a..g, active low), both decimal points must
// follow sw[2] and ledg0 must follow sw[3].
module led_display_tb;
  logic [3:0] sw;
  logic [7:0] hex1, hex0;
  logic ledg0;
  int checks = 0, failures = 0;
  led_display dut (.sw, .hex1, .hex0, .ledg0);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // lit segments (a..g = bit 0..6) for a character
  function automatic logic [6:0] seg(int ch);
    case (ch)
      1: return 7'b0000110;             // b c
      2: return 7'b1011011;             // a b d e g
      3: return 7'b1001111;             // a b c d g
      4: return 7'b1100110;             // b c f g
      default: return 7'b1110011;       // P: a b e f g
    endcase
  endfunction

  initial begin
    for (int s = 0; s < 16; s++) begin
      sw = 4'(s); #1;
      chk(~hex1[6:0] == seg(0), "P");
      chk(~hex0[6:0] == seg(s % 4 + 1), $sformatf("digit for sw %b", sw));
      chk(~hex1[7] == sw[2] && ~hex0[7] == sw[2], "decimal points");
      chk(ledg0 == sw[3], "ledg0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
