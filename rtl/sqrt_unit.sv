// Pipelined square root.
//
// The 18-bit unsigned 4.14 argument is padded with 18 zero LSBs to a 36-bit radicand;
// its 18-bit root is the square root of the argument in unsigned 2.16. One result bit
// is decided per stage, most significant first (restoring digit-by-digit method): with
// the partial root r and the remainder R = N - r^2, bit b is set when
// (r << (b+1)) + 2^(2b) <= R, and R is reduced by that amount. NSTAGES = 18 stages,
// each with pipeline registers, give one root per clock after 18 clocks. The formats,
// the zero padding and the 18-stage pipeline follow the design documentation; the
// digit-by-digit method stands in for the algorithm the documentation cites but does
// not spell out.
//
// Timing: latency NSTAGES + 1 clocks, one result per clock.
module sqrt_unit #(
  parameter int NSTAGES = 18
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic [17:0] arg,
  output logic        out_valid,
  output logic [17:0] root
);
  logic [37:0] rem [NSTAGES+1];
  logic [17:0] r   [NSTAGES+1];
  logic        v   [NSTAGES+1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k <= NSTAGES; k++) begin
        rem[k] <= '0; r[k] <= '0; v[k] <= 1'b0;
      end
    end else begin
      rem[0] <= {2'b00, arg, 18'd0};
      r[0]   <= '0;
      v[0]   <= in_valid;
      for (int k = 0; k < NSTAGES; k++) begin
        logic [37:0] trial;
        trial = (38'(r[k]) << (NSTAGES - k)) + (38'd1 << (2 * (NSTAGES - 1 - k)));
        if (trial <= rem[k]) begin
          rem[k+1] <= rem[k] - trial;
          r[k+1]   <= r[k] | (18'd1 << (NSTAGES - 1 - k));
        end else begin
          rem[k+1] <= rem[k];
          r[k+1]   <= r[k];
        end
        v[k+1] <= v[k];
      end
    end
  end
  assign root      = r[NSTAGES];
  assign out_valid = v[NSTAGES];
endmodule
