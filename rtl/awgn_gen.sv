// Complex AWGN generator.
//
// Two identical, independent awgn_component instances (different LFSR seeds) give the
// real and imaginary noise. A parallel structure rather than a multiplexed one is used
// because the noise is added to the demultiplexed channel stack and the generators
// already run at the highest clock rate; both choices follow the design
// documentation.
//
// Timing: one complex sample every 4 clocks (8 per symbol), out_valid marks it.
module awgn_gen
  import emu_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [17:0]        level,
  output logic               out_valid,
  output logic signed [21:0] noise_i,
  output logic signed [21:0] noise_q
);
  logic vi, vq;
  awgn_component #(.SEED(64'h0123_4567_89AB_CDEF)) u_i (
    .clk, .rst, .level, .out_valid(vi), .noise(noise_i));
  awgn_component #(.SEED(64'hFEDC_BA98_7654_3210)) u_q (
    .clk, .rst, .level, .out_valid(vq), .noise(noise_q));
  assign out_valid = vi & vq;
endmodule
