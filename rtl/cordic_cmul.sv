// CORDIC-based complex multiplier (frequency translator).
//
// Shifts a parallel I/Q stream (8 samples/symbol) in frequency by multiplying each
// sample by exp(j*phase). A 32-bit phase accumulator (1 Hz resolution at 40 MHz)
// advances by freq per sample; the CORDIC is loaded with the sample's I and Q as its
// starting vector and the accumulated phase as its angle, so the rotation itself is
// the complex multiplication and no multiplier is needed for it. The CORDIC gain is
// removed at the output with one constant multiplication by 2^17/K, then the result is
// saturated to 2.16. Accumulator width and the CORDIC approach follow the design
// documentation; the gain compensation is this design's choice.
//
// Timing: latency NSTAGES + 4 clocks; dout.valid follows din.valid.
module cordic_cmul
  import emu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  iqpar_t      din,
  input  logic [31:0] freq,
  output iqpar_t      dout
);
  logic [31:0] phase;
  logic        cv;
  logic signed [19:0] cx, cy;

  always_ff @(posedge clk) begin
    if (rst)            phase <= '0;
    else if (din.valid) phase <= phase + freq;
  end

  cordic #(.NSTAGES(18), .IW(37)) u_cordic (
    .clk, .rst, .in_valid(din.valid), .x_in(din.i), .y_in(din.q), .theta(phase),
    .out_valid(cv), .x_out(cx), .y_out(cy));

  function automatic s18_t comp(logic signed [19:0] v);
    logic signed [38:0] p;
    p = v * $signed({1'b0, CORDIC_INV_GAIN});
    p = p >>> 17;
    if (p > 39'sd131071)       return 18'sd131071;
    else if (p < -39'sd131072) return -18'sd131072;
    else                       return p[17:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) dout <= '0;
    else begin
      dout.valid <= cv;
      if (cv) begin
        dout.i <= comp(cx);
        dout.q <= comp(cy);
      end
    end
  end
endmodule
