// Output signal RAMs.
//
// A pair of DEPTH x 22-bit RAMs stores the real and imaginary emulator output. The
// write address starts at 0 when the emulator leaves reset and advances with every
// valid output sample; when the last word has been written, writing stops (full is
// set) so that the captured preamble is never overwritten. A synchronous read port
// lets the contents be inspected while the emulator runs.
// Depth (65536 samples = about 8000 symbols at 8 samples/symbol), word size and the
// stop-when-full rule follow the design documentation; the read port stands for the
// FPGA memory editor and is this design's choice.
//
// Timing: a sample is written on the clock where in_valid is high; rdata_* follow
// raddr by one clock.
module out_capture #(
  parameter int DEPTH = 65536
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [21:0]       in_i,
  input  logic signed [21:0]       in_q,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic signed [21:0]       rdata_i,
  output logic signed [21:0]       rdata_q,
  output logic                     full
);
  localparam int AW = $clog2(DEPTH);
  logic signed [21:0] mem_i [DEPTH];
  logic signed [21:0] mem_q [DEPTH];
  logic [AW-1:0]      waddr;

  always_ff @(posedge clk) begin
    if (rst) begin
      waddr <= '0; full <= 1'b0;
    end else if (in_valid && !full) begin
      waddr <= waddr + 1'b1;
      if (waddr == AW'(DEPTH - 1)) full <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && !full && !rst) begin
      mem_i[waddr] <= in_i;
      mem_q[waddr] <= in_q;
    end
    rdata_i <= mem_i[raddr];
    rdata_q <= mem_q[raddr];
  end
endmodule
