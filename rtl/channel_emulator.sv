// Upstream DOCSIS channel emulator: top level.
//
// The clock is the clk32 rate (32 clocks per symbol, 160 MHz for 5 Msym/s); the
// slower rates of the design (clk16 .. symbol clock) are clock enables from
// emu_timing. Signal flow:
//   load_params  -- four channel profiles, parameter registers, emulator reset
//   main channel -- main_tx_data (preamble, then pseudorandom data, symbol capture)
//                   -> ps_filter (8 symbols, 4 DSMACs) -> upsampler (8 samples/symbol)
//                   -> multipath (direct path + 3 echoes) -> cordic_demux
//                   -> cordic_cmul (frequency shift) -> gain_boost (DIP switches)
//   2 adjacent channels (adj_channel), gain by filter multiplier and bit shift
//   channel stack: main + adjacent channels (sw[2]) + complex AWGN (sw[3])
//   output: 22-bit 6.16 I and Q at 8 samples/symbol, captured by out_capture
//   led_display: profile number, adjacent and noise indicators
//
// Interface. button_0 is the active-high power-up reset. sw[1:0] selects the
// profile, sw[2] the adjacent channels, sw[3] the noise; dip[2:0] are the gain boost
// switches (DIP[7:5]). The ed_* port writes the profile memories and the pre_* port
// writes the preamble memories (both stand for the JTAG memory editor, which is not
// implemented). The symbol capture and output capture memories have read ports.
// out_i/out_q/out_valid is the emulator output that would drive the DACs (not
// implemented); the PLL that makes the clock is outside this design too.
//
// Timing. After button_0 the parameters load in 2 symbols (loading high); then the
// emulator starts and out_valid pulses on every 4th clock (8 samples per symbol).
// The stack is summed from the latest sample of each source, all of which run at
// the same rate.
// Structure and switch functions follow the design documentation. The slot map,
// the stacking register scheme and the saturation of the sum are this design's
// choices.
module channel_emulator
  import emu_pkg::*;
(
  input  logic               clk,
  input  logic               button_0,
  input  logic [3:0]         sw,
  input  logic [2:0]         dip,
  // profile memory edit port
  input  logic               ed_we,
  input  logic [1:0]         ed_prof,
  input  logic [4:0]         ed_addr,
  input  logic [31:0]        ed_wdata,
  // preamble memory edit port
  input  logic               pre_we,
  input  logic [2:0]         pre_ram,
  input  logic [7:0]         pre_addr,
  input  logic [5:0]         pre_wdata,
  // symbol capture read port
  input  logic [15:0]        sym_raddr,
  output logic [5:0]         sym_rdata,
  output logic               sym_full,
  // output capture read port
  input  logic [15:0]        cap_raddr,
  output logic signed [21:0] cap_rdata_i,
  output logic signed [21:0] cap_rdata_q,
  output logic               cap_full,
  // status
  output logic               loading,
  output logic               preamble_done,
  output logic [5:0]         tx_word,
  // emulator output (to the DACs)
  output logic               out_valid,
  output logic signed [21:0] out_i,
  output logic signed [21:0] out_q,
  // indicators
  output logic [7:0]         hex1,
  output logic [7:0]         hex0,
  output logic               ledg0
);
  localparam int NECHO = 3;

  timing_t     tim;
  logic        sym_en;
  logic [31:0] param [NSLOT];
  logic        rst;

  emu_timing u_tim (.clk, .rst(button_0), .tim, .sym_en);

  load_params u_load (
    .clk, .rst(button_0), .ce16(tim.ce16), .sw(sw[1:0]), .ed_we, .ed_prof, .ed_addr, .ed_wdata,
    .param, .load_pulse(loading));

  assign rst = button_0 | loading;

  // ---------------- main channel ----------------
  sym_t       si, sq;
  iqmux_t     ps, up, mp;
  iqpar_t     par, sh;
  logic               mv;
  logic signed [21:0] mi, mq;

  main_tx_data u_tx (
    .clk, .rst, .en(sym_en), .mode(param[P_MAIN_MODE][2:0]),
    .pre_len(param[P_PRE_LEN][8:0]), .pre_we, .pre_ram, .pre_addr, .pre_wdata,
    .word(tx_word), .sym_i(si), .sym_q(sq), .preamble_done, .cap_raddr(sym_raddr),
    .cap_rdata(sym_rdata), .cap_full(sym_full));

  ps_filter #(.NSYM(8)) u_ps (
    .clk, .rst, .tim, .sym_i(si), .sym_q(sq), .gain(MAIN_PS_GAIN), .dout(ps));

  upsampler u_up (.clk, .rst, .din(ps), .dout(up));

  logic [5:0]         e_dly [NECHO];
  logic signed [17:0] e_frac [NECHO];
  logic signed [17:0] e_gre [NECHO];
  logic signed [17:0] e_gim [NECHO];
  for (genvar e = 0; e < NECHO; e++) begin : g_echo_par
    assign e_dly[e]  = param[P_ECHO_BASE + 4*e + 0][5:0];
    assign e_frac[e] = param[P_ECHO_BASE + 4*e + 1][17:0];
    assign e_gre[e]  = param[P_ECHO_BASE + 4*e + 2][17:0];
    assign e_gim[e]  = param[P_ECHO_BASE + 4*e + 3][17:0];
  end

  multipath #(.NECHO(NECHO)) u_mp (
    .clk, .rst, .din(up), .int_dly(e_dly), .frac(e_frac), .gain_re(e_gre),
    .gain_im(e_gim), .dout(mp));

  cordic_demux u_dm (.clk, .rst, .din(mp), .dout(par));
  cordic_cmul u_cm (.clk, .rst, .din(par), .freq(param[P_MAIN_FREQ]), .dout(sh));
  gain_boost u_gb (.clk, .rst, .dip, .din(sh), .out_valid(mv), .out_i(mi), .out_q(mq));

  // ---------------- adjacent channels ----------------
  iqpar_t a1, a2;
  adj_channel u_adj1 (
    .clk, .rst, .tim, .sym_en, .mode(param[P_ADJ1_MODE][2:0]), .gain(param[P_ADJ1_GAIN][16:0]),
    .freq(param[P_ADJ1_FREQ]), .dout(a1));
  adj_channel #(
    .SEEDS('{41'h1_5555_AAAA, 41'h0_3C3C_C3C3, 41'h1_0F1E_2D3C, 41'h0_4B5A_6978,
             41'h1_8796_A5B4, 41'h0_C3D2_E1F0}),
    .WIRING('{5, 2, 4, 0, 3, 1})
  ) u_adj2 (
    .clk, .rst, .tim, .sym_en, .mode(param[P_ADJ2_MODE][2:0]), .gain(param[P_ADJ2_GAIN][16:0]),
    .freq(param[P_ADJ2_FREQ]), .dout(a2));

  // ---------------- noise ----------------
  logic               nv;
  logic signed [21:0] ni, nq;
  awgn_gen u_awgn (.clk, .rst, .level(param[P_NOISE_LEVEL][17:0]), .out_valid(nv),
                   .noise_i(ni), .noise_q(nq));

  // ---------------- channel stack ----------------
  logic signed [21:0] h_mi, h_mq, h_ni, h_nq;
  logic signed [17:0] h_a1i, h_a1q, h_a2i, h_a2q;
  logic [2:0]         s1, s2;
  logic signed [26:0] sum_i, sum_q;

  assign s1 = param[P_ADJ1_SHIFT][2:0];
  assign s2 = param[P_ADJ2_SHIFT][2:0];

  function automatic logic signed [21:0] sat22(logic signed [26:0] v);
    if (v > 27'sd2097151)       return 22'sh1FFFFF;
    else if (v < -27'sd2097152) return 22'sh200000;
    else                        return 22'(v);
  endfunction

  always_comb begin
    sum_i = 27'(h_mi);
    sum_q = 27'(h_mq);
    if (sw[2]) begin
      sum_i = sum_i + (27'(h_a1i) <<< s1) + (27'(h_a2i) <<< s2);
      sum_q = sum_q + (27'(h_a1q) <<< s1) + (27'(h_a2q) <<< s2);
    end
    if (sw[3]) begin
      sum_i = sum_i + 27'(h_ni);
      sum_q = sum_q + 27'(h_nq);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      h_mi <= '0; h_mq <= '0; h_ni <= '0; h_nq <= '0;
      h_a1i <= '0; h_a1q <= '0; h_a2i <= '0; h_a2q <= '0;
      out_i <= '0; out_q <= '0; out_valid <= 1'b0;
    end else begin
      if (mv)       begin h_mi <= mi;   h_mq <= mq;   end
      if (a1.valid) begin h_a1i <= a1.i; h_a1q <= a1.q; end
      if (a2.valid) begin h_a2i <= a2.i; h_a2q <= a2.q; end
      if (nv)       begin h_ni <= ni;   h_nq <= nq;   end
      out_valid <= tim.ce8;
      if (tim.ce8) begin
        out_i <= sat22(sum_i);
        out_q <= sat22(sum_q);
      end
    end
  end

  out_capture #(.DEPTH(65536)) u_cap (
    .clk, .rst, .in_valid(out_valid), .in_i(out_i), .in_q(out_q), .raddr(cap_raddr),
    .rdata_i(cap_rdata_i), .rdata_q(cap_rdata_q), .full(cap_full));

  led_display u_led (.sw, .hex1, .hex0, .ledg0);
endmodule
