// Pipelined rotation CORDIC.
//
// Rotates the vector (x_in, y_in) by the angle theta (unsigned, a full turn = 2^32)
// using only shifts and additions. A first stage rotates by the multiple of 90 degrees
// given by the two top bits of theta, leaving a residual angle in [0, 90) degrees;
// NSTAGES micro-rotation stages by +-atan(2^-i) then drive the residual to zero, each
// stage choosing the direction from the sign of what is left. Every stage has pipeline
// registers, so one new vector can enter on every clock. Internal precision is IW = 37
// bits (inputs sign-extended by 2 bits and padded with 17 fractional bits); the result
// is rounded back to 4.16 (20 bits) at the output. The result carries the CORDIC gain
// K = 1.64676, which users compensate (cordic_cmul) or pre-divide (noise generator).
// Stage count, precision and output rounding follow the design documentation; the
// quadrant pre-rotation and the sign-of-residual decision (in place of a comparator of
// accumulated angle against the input angle) are this design's choices.
//
// Timing: latency NSTAGES + 2 clocks; out_valid follows in_valid.
module cordic
  import emu_pkg::*;
#(
  parameter int NSTAGES = 18,
  parameter int IW      = 37
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic signed [17:0] x_in,
  input  logic signed [17:0] y_in,
  input  logic [31:0]        theta,
  output logic               out_valid,
  output logic signed [19:0] x_out,
  output logic signed [19:0] y_out
);
  typedef logic signed [IW-1:0] w_t;
  localparam int FR = IW - 20;         // extra fractional bits inside

  w_t                 xs [NSTAGES+1];
  w_t                 ys [NSTAGES+1];
  logic signed [31:0] zs [NSTAGES+1];
  logic               vs [NSTAGES+1];

  w_t xe, ye;
  assign xe = w_t'(x_in) <<< FR;
  assign ye = w_t'(y_in) <<< FR;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k <= NSTAGES; k++) begin
        xs[k] <= '0; ys[k] <= '0; zs[k] <= '0; vs[k] <= 1'b0;
      end
      x_out <= '0; y_out <= '0; out_valid <= 1'b0;
    end else begin
      // quadrant pre-rotation
      case (theta[31:30])
        2'd0: begin xs[0] <= xe;  ys[0] <= ye;  end
        2'd1: begin xs[0] <= -ye; ys[0] <= xe;  end
        2'd2: begin xs[0] <= -xe; ys[0] <= -ye; end
        default: begin xs[0] <= ye; ys[0] <= -xe; end
      endcase
      zs[0] <= {2'b00, theta[29:0]};
      vs[0] <= in_valid;
      for (int i = 0; i < NSTAGES; i++) begin
        if (!zs[i][31]) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - $signed(CORDIC_ATAN[i]);
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + $signed(CORDIC_ATAN[i]);
        end
        vs[i+1] <= vs[i];
      end
      x_out     <= 20'((xs[NSTAGES] + (w_t'(1) <<< (FR - 1))) >>> FR);
      y_out     <= 20'((ys[NSTAGES] + (w_t'(1) <<< (FR - 1))) >>> FR);
      out_valid <= vs[NSTAGES];
    end
  end
endmodule
