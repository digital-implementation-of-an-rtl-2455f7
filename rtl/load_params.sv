// Load parameters circuit: four channel-profile memories and the parameter registers.
//
// Four 32 x 32-bit RAMs hold the user-programmable channel profiles. One address
// counter cycles all four RAMs together, one word per clk16 enable, so a full pass
// over the 32 words takes two symbol periods. A data selector driven by sw[1:0]
// passes the word of the chosen profile, and the parameter register of the slot
// just read is loaded (a serial-to-parallel conversion). The cycling never stops,
// so an edit of the selected profile or a change of sw[1:0] reaches the registers
// within two symbol periods. After reset, load_pulse stays high until the last
// address (31) has been read; it is used as the reset of the rest of the emulator,
// so that every circuit starts with valid parameters.
// The RAM organisation, the address cycling at clk16, the selector and the
// load_pulse behaviour follow the design documentation. The slot map (emu_pkg), the
// default contents of the four profiles and the synchronous edit port (standing for
// the JTAG memory editor) are this design's choices.
//
// Timing: the RAM read is registered, so a slot's register is loaded two clocks
// after its address is applied. load_pulse falls on the clock after word 31 is stored.
module load_params
  import emu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce16,
  input  logic [1:0]  sw,
  // profile edit port
  input  logic        ed_we,
  input  logic [1:0]  ed_prof,
  input  logic [4:0]  ed_addr,
  input  logic [31:0] ed_wdata,
  output logic [31:0] param [NSLOT],
  output logic        load_pulse
);
  logic [31:0] ram [4][32];
  logic [4:0]  addr, addr_d;
  logic        rd_v;
  logic [31:0] rdata [4];

  // default profiles: 1 QPSK1, 2 16-QAM, 3 64-QAM, 4 32-QAM; the echoes of
  // profiles 3 and 4 follow the two-echo and three-echo cases of the DOCSIS
  // micro-reflection limits
  function automatic logic [31:0] dflt(int p, int a);
    logic [31:0] v;
    v = '0;
    case (a)
      P_MAIN_MODE:   v = (p == 0) ? 32'(MOD_QPSK1) : (p == 1) ? 32'(MOD_16QAM)
                       : (p == 2) ? 32'(MOD_64QAM) : 32'(MOD_32QAM);
      P_ADJ1_MODE:   v = (p == 3) ? 32'(MOD_64QAM) : 32'(MOD_16QAM);
      P_ADJ2_MODE:   v = (p == 3) ? 32'(MOD_8QAM) : 32'(MOD_QPSK0);
      P_PRE_LEN:     v = 32'd32;
      P_MAIN_FREQ:   v = 32'd0;
      P_ADJ1_FREQ:   v = 32'd671088640;                     // +6.25 MHz of 40 MHz
      P_ADJ2_FREQ:   v = 32'(-32'sd671088640);              // -6.25 MHz
      P_ECHO_BASE + 0:  v = (p >= 2) ? 32'd2 : 32'd0;       // delay, samples
      P_ECHO_BASE + 1:  v = (p >= 2) ? 32'd65536 : 32'd0;   // +0.5 sample
      P_ECHO_BASE + 2:  v = (p >= 1) ? 32'd41449 : 32'd0;   // -10 dB
      P_ECHO_BASE + 4:  v = (p >= 2) ? 32'd9 : 32'd0;
      P_ECHO_BASE + 5:  v = 32'(-32'sd32768);               // -0.25 sample
      P_ECHO_BASE + 7:  v = (p >= 2) ? 32'd13107 : 32'd0;   // -20 dB, imaginary
      P_ECHO_BASE + 8:  v = (p == 3) ? 32'd60 : 32'd0;
      P_ECHO_BASE + 10: v = (p == 3) ? 32'(-32'sd4145) : 32'd0; // -30 dB
      P_ADJ1_GAIN:   v = 32'd81920;                         // 0.625 * 2^4 = 10 (20 dB)
      P_ADJ2_GAIN:   v = 32'd65536;
      P_ADJ1_SHIFT:  v = 32'd4;
      P_ADJ2_SHIFT:  v = 32'd3;
      P_NOISE_LEVEL: v = (p == 0) ? 32'd26214 : 32'd6554;    // 0.2, 0.05
      default:       v = '0;
    endcase
    return v;
  endfunction

  initial begin
    for (int p = 0; p < 4; p++)
      for (int a = 0; a < 32; a++) ram[p][a] = dflt(p, a);
  end

  always_ff @(posedge clk) begin
    if (ed_we) ram[ed_prof][ed_addr] <= ed_wdata;
    for (int p = 0; p < 4; p++) rdata[p] <= ram[p][addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      addr <= '0; addr_d <= '0; rd_v <= 1'b0; load_pulse <= 1'b1;
      for (int s = 0; s < NSLOT; s++) param[s] <= '0;
    end else begin
      rd_v <= 1'b0;
      if (ce16) begin
        addr   <= addr + 5'd1;
        addr_d <= addr;
        rd_v   <= 1'b1;
      end
      if (rd_v) begin
        if (int'(addr_d) < NSLOT) param[addr_d] <= rdata[sw];
        if (addr_d == 5'd31) load_pulse <= 1'b0;
      end
    end
  end
endmodule
