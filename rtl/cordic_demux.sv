// CORDIC input demultiplexer.
//
// Serial-to-parallel converter: the multiplexed I,Q stream at 16 samples/symbol
// becomes parallel I and Q at 8 samples/symbol, because the CORDIC frequency
// translator takes both components of a sample at once. The I sample is held until
// its Q partner arrives, then both are presented together. Function from the design
// documentation; the realisation with the stream's q tag is this design's.
//
// Timing: dout.valid pulses one clock after each Q sample of din.
module cordic_demux
  import emu_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  iqmux_t din,
  output iqpar_t dout
);
  s18_t ihold;
  always_ff @(posedge clk) begin
    if (rst) begin
      ihold <= '0; dout <= '0;
    end else begin
      dout.valid <= din.valid && din.q;
      if (din.valid) begin
        if (!din.q) ihold <= din.d;
        else begin
          dout.i <= ihold;
          dout.q <= din.d;
        end
      end
    end
  end
endmodule
