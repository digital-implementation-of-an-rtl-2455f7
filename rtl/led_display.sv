// User indicators: dual 8-segment display and the noise LED.
//
// The display shows the selected channel profile as "P1".."P4" (digit = sw[1:0] + 1).
// Both decimal points are lit when the adjacent channels are switched on (sw[2]), so
// profile 2 with adjacent channels reads "P.2.". ledg0 is lit when the noise is
// switched on (sw[3]). The indications follow the design documentation; the
// segment encoding (bit order {dp,g,f,e,d,c,b,a}, active low as on common-anode
// displays) is this design's choice.
//
// Timing: combinational.
module led_display (
  input  logic [3:0] sw,
  output logic [7:0] hex1,   // left digit: "P"
  output logic [7:0] hex0,   // right digit: profile number
  output logic       ledg0
);
  logic [6:0] dig;
  always_comb begin
    case (sw[1:0])
      2'd0:    dig = 7'b000_0110;   // 1
      2'd1:    dig = 7'b101_1011;   // 2
      2'd2:    dig = 7'b100_1111;   // 3
      default: dig = 7'b110_0110;   // 4
    endcase
  end
  assign hex1  = ~{sw[2], 7'b111_0011};   // P
  assign hex0  = ~{sw[2], dig};
  assign ledg0 = sw[3];
endmodule
