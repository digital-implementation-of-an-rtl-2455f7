// Pipelined natural logarithm, |ln(y_in)| of an 18-bit uniform fraction.
//
// y_in is an unsigned 0.18 fraction (0 is treated as 2^-18). A pre-processor shifts it
// left until its top bit is set, giving the mantissa y_m in [1, 2) (1.17 format) and
// the exponent y_e = shift + 1, so that y_in = y_m * 2^-y_e. NSTAGES successive-
// approximation stages then build ln(y_m) from below: stage k tries to multiply the
// running product p (starting at 1) by (1 + 2^-k), which is a shift and an add; if the
// result does not exceed y_m it is kept and ln(1 + 2^-k) is added to the running
// logarithm x. The increments are natural-log constants, so no ln 2 correction is
// needed at the output. The post-processor uses the exponent:
// |ln(y_in)| = y_e * ln 2 - ln(y_m), output in unsigned 4.14.
// Internal precision is 37 bits (p: 1.36, x: 3.34). Because the approximation always
// stays below the true value, x starts at half the last increment (xinit) to centre
// the error. Stage count, precision, pre/post-processing and the biased xinit follow
// the design documentation; the value of xinit is this design's choice.
//
// Timing: latency NSTAGES + 2 clocks, one result per clock.
module ln_unit
  import emu_pkg::*;
#(
  parameter int NSTAGES = 18
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic [17:0] y_in,
  output logic        out_valid,
  output logic [17:0] ln_out
);
  localparam logic [37:0] ONE   = 38'd1 << 36;
  localparam logic [36:0] XINIT = LN_INC[NSTAGES-1] >> 1;

  // pre-processing
  logic [17:0] y1;
  logic [4:0]  lz;
  always_comb begin
    y1 = (y_in == '0) ? 18'd1 : y_in;
    lz = 5'd17;
    for (int b = 0; b < 18; b++) if (y1[b]) lz = 5'(17 - b);
  end

  logic [37:0] ym  [NSTAGES+1];
  logic [37:0] p   [NSTAGES+1];
  logic [36:0] x   [NSTAGES+1];
  logic [4:0]  ye  [NSTAGES+1];
  logic        v   [NSTAGES+1];

  logic [41:0] post;
  assign post = 42'(ye[NSTAGES]) * 42'(LN2_C) - 42'(x[NSTAGES]);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k <= NSTAGES; k++) begin
        ym[k] <= '0; p[k] <= '0; x[k] <= '0; ye[k] <= '0; v[k] <= 1'b0;
      end
      ln_out <= '0; out_valid <= 1'b0;
    end else begin
      ym[0] <= 38'(y1 << lz) << 19;      // 1.17 -> 1.36
      p[0]  <= ONE;
      x[0]  <= XINIT;
      ye[0] <= lz + 5'd1;
      v[0]  <= in_valid;
      for (int k = 0; k < NSTAGES; k++) begin
        logic [37:0] t;
        t = p[k] + (p[k] >> (k + 1));
        if (t <= ym[k]) begin
          p[k+1] <= t;
          x[k+1] <= x[k] + LN_INC[k];
        end else begin
          p[k+1] <= p[k];
          x[k+1] <= x[k];
        end
        ym[k+1] <= ym[k];
        ye[k+1] <= ye[k];
        v[k+1]  <= v[k];
      end
      // 34 fractional bits -> 14, rounded
      ln_out    <= 18'((post + 42'd524288) >> 20);
      out_valid <= v[NSTAGES];
    end
  end
endmodule
