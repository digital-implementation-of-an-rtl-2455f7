// Dual-stream multiply and accumulate (DSMAC).
//
// One multiplier and one adder serve two interleaved data streams. On each enabled
// clock the product x*c is added to the accumulator; the enable flagged 'first'
// starts a new sum and, on the same edge, moves the finished sum to the output
// register of the stream it belongs to: a sum finished at the start of the second
// half symbol (half = 1) is the I result, one finished at the start of the first half
// (half = 0) is the Q result. In the pulse-shaping filter a sum has 8 products: 8 I
// products in the first half symbol, 8 Q products in the second, at 16 enables per
// symbol. The design documentation uses separate I and Q accumulators; a single
// accumulator with two output registers gives the same results with fewer registers.
//
// Timing: iout/qout update on the 'first' enable and hold for a whole symbol.
module dsmac #(
  parameter int XW = 18,
  parameter int CW = 18,
  parameter int AW = 40
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic                 first,
  input  logic                 half,
  input  logic signed [XW-1:0] x,
  input  logic signed [CW-1:0] c,
  output logic signed [AW-1:0] iout,
  output logic signed [AW-1:0] qout
);
  logic signed [AW-1:0] acc;
  logic signed [XW+CW-1:0] prod;

  assign prod = x * c;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      iout <= '0;
      qout <= '0;
    end else if (ce) begin
      if (first) begin
        acc <= AW'(prod);
        if (half) iout <= acc;
        else      qout <= acc;
      end else begin
        acc <= acc + AW'(prod);
      end
    end
  end
endmodule
