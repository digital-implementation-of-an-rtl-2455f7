// One component (I or Q) of the complex AWGN generator.
//
// Box-Muller combined with averaging. Two banks of 18 LFSRs (each LFSR gives one bit
// per clock) produce two independent uniform 18-bit variables x1 and x2 at the clk32
// rate. f(x1) = sqrt(-ln x1) comes from the pipelined logarithm followed by the
// pipelined square root; g(x2) = sqrt(2)*cos(2*pi*x2) from a CORDIC started at
// (sqrt(2)/K, 0) and rotated by x2 turns (on alternate clocks the sine output is
// used instead, which has the same distribution for a uniform x2). Their product is an approximately Gaussian
// sample of unit variance. Four consecutive products (32 per symbol) are summed and
// divided by 4, which improves the Gaussian shape (central limit theorem) and gives one
// sample per 8x period with standard deviation 1/2. The sample is scaled by the noise
// level (unsigned 1.17) and output as 6.16 (22 bits).
// The method, the rates and the use of the successive-approximation circuits follow the
// design documentation. The LFSR lengths (18 maximal-length registers of 33..79
// bits) and seeds are this design's; x1 and x2 are not latency matched, which does not
// matter because they are independent.
//
// Timing: a new output every 4 clocks (out_valid), after a start-up of about 45 clocks.
module awgn_component
  import emu_pkg::*;
#(
  parameter logic [63:0] SEED = 64'h0123_4567_89AB_CDEF
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [17:0]        level,
  output logic               out_valid,
  output logic signed [21:0] noise
);
  localparam int unsigned LEN [18] = '{79, 73, 71, 68, 65, 63, 60, 58, 57, 55, 52, 49, 47,
                                       41, 39, 36, 35, 33};
  localparam int unsigned TAP [18] = '{70, 48, 65, 59, 47, 62, 59, 39, 50, 31, 49, 40, 42,
                                       38, 35, 25, 33, 20};

  logic [17:0] x1, x2;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    for (genvar g = 0; g < 18; g++) begin : g_l
      localparam int unsigned L = LEN[g];
      localparam logic [78:0] MASK = (79'd1 << (L - 1)) | (79'd1 << (TAP[g] - 1));
      localparam logic [78:0] SD = {15'd0, SEED ^ (64'h9E37_79B9_7F4A_7C15 * 64'(b * 18 + g + 1))}
                                   | 79'd1;
      logic         o;
      lfsr #(.LEN(L), .TAPS(MASK[L-1:0])) u_lfsr (
        .clk, .rst, .en(1'b1), .seed(SD[L-1:0]), .bit_out(o));
      if (b == 0) begin : g_x1
        assign x1[g] = o;
      end else begin : g_x2
        assign x2[g] = o;
      end
    end
  end

  // f(x1) = sqrt(|ln x1|)
  logic        lv, fv, gv;
  logic [17:0] lnv, f;
  ln_unit #(.NSTAGES(18)) u_ln (.clk, .rst, .in_valid(1'b1), .y_in(x1),
                                .out_valid(lv), .ln_out(lnv));
  sqrt_unit #(.NSTAGES(18)) u_sqrt (.clk, .rst, .in_valid(lv), .arg(lnv),
                                    .out_valid(fv), .root(f));

  // g(x2) = sqrt(2) cos(2 pi x2)
  logic signed [19:0] gx, gy;
  cordic #(.NSTAGES(18), .IW(37)) u_cos (
    .clk, .rst, .in_valid(1'b1), .x_in($signed(SQRT2_OVER_K)), .y_in(18'sd0),
    .theta({x2, 14'd0}), .out_valid(gv), .x_out(gx), .y_out(gy));

  // product (4.16) and average of four
  logic signed [38:0] prod;
  logic signed [19:0] gs;
  logic signed [19:0] smp;
  logic signed [21:0] acc;
  logic [1:0]         cnt;
  logic               run;
  logic signed [40:0] scaled;

  assign gs     = cnt[0] ? gy : gx;
  assign prod   = $signed({1'b0, f}) * gs;
  logic signed [21:0] avg;
  assign avg    = acc >>> 2;
  assign scaled = 41'(avg) * 41'($signed({1'b0, level}));

  always_ff @(posedge clk) begin
    if (rst) begin
      smp <= '0; acc <= '0; cnt <= '0; run <= 1'b0;
      noise <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (fv && gv) run <= 1'b1;
      smp <= 20'(prod >>> 16);
      if (run) begin
        cnt <= cnt + 2'd1;
        if (cnt == 2'd0) acc <= 22'(smp);
        else             acc <= acc + 22'(smp);
        if (cnt == 2'd0) begin
          noise     <= 22'(scaled >>> 17);
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
