// Main channel transmit data circuit.
//
// After reset (the end of parameter loading) the circuit is in preamble mode: on each
// symbol enable it reads the next word of the preamble RAM that belongs to the current
// modulation (five 256-word RAMs of 2, 3, 4, 5 and 6 bits; both QPSK modes share the
// 2-bit RAM). When pre_len words have been sent, the preamble detector sets
// preamble_done and the circuit stays in data mode until the next reset: the
// pseudorandom symbol generator supplies the words and each one is also written to a
// 6-bit x 65536-word capture RAM, which stops when full, for off-line MER analysis.
// The selected word is mapped to I/Q by the symbol mapper.
//
// The structure follows the design documentation; the edit port of the preamble RAMs
// (which stands for the FPGA's memory editor), the RAMs' initial contents (word =
// address) and the pre_len register are this design's choices.
//
// Timing: word, sym_i and sym_q change one clock after en.
module main_tx_data
  import emu_pkg::*;
#(
  parameter int unsigned PRE_DEPTH = 256,
  parameter int unsigned CAP_DEPTH = 65536,
  parameter logic [40:0] SEEDS  [6] = '{41'h0_1234_5678, 41'h1_8765_4321, 41'h2_5A5A_A5A5,
                                        41'h0_DEAD_BEEF, 41'h1_F0F0_0F0F, 41'h0_C3C3_3C3C},
  parameter int unsigned WIRING [6] = '{0, 1, 2, 3, 4, 5}
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          en,
  input  logic [2:0]                    mode,
  input  logic [8:0]                    pre_len,
  // preamble RAM edit port; pre_ram 0..4 = 2..6-bit RAM
  input  logic                          pre_we,
  input  logic [2:0]                    pre_ram,
  input  logic [$clog2(PRE_DEPTH)-1:0]  pre_addr,
  input  logic [5:0]                    pre_wdata,
  output logic [5:0]                    word,
  output sym_t                          sym_i,
  output sym_t                          sym_q,
  output logic                          preamble_done,
  // capture RAM read port
  input  logic [$clog2(CAP_DEPTH)-1:0]  cap_raddr,
  output logic [5:0]                    cap_rdata,
  output logic                          cap_full
);
  localparam int PAW = $clog2(PRE_DEPTH);
  localparam int CAW = $clog2(CAP_DEPTH);

  logic [5:0] gen_word;
  logic [8:0] pre_cnt;
  logic [CAW-1:0] cap_addr;
  logic [5:0] pre_word [5];
  logic [2:0] ram_idx;
  logic       data_mode;
  logic [8:0] pre_last;

  // preamble lengths above the RAM depth are clipped to it
  assign pre_last  = (pre_len > 9'(PRE_DEPTH)) ? 9'(PRE_DEPTH) : pre_len;
  assign data_mode = preamble_done || (pre_last == 9'd0);

  assign ram_idx = (mode == MOD_QPSK0 || mode == MOD_QPSK1) ? 3'd0
                 : (mode > MOD_64QAM) ? 3'd4 : 3'(mode - 3'd1);

  for (genvar g = 0; g < 5; g++) begin : g_pre
    localparam int W = g + 2;
    logic [W-1:0] mem [PRE_DEPTH];
    initial for (int a = 0; a < int'(PRE_DEPTH); a++) mem[a] = W'(a);
    always_ff @(posedge clk)
      if (pre_we && pre_ram == 3'(g)) mem[pre_addr] <= pre_wdata[W-1:0];
    assign pre_word[g] = 6'(mem[pre_cnt[PAW-1:0]]);
  end

  symbol_generator #(.SEEDS(SEEDS), .WIRING(WIRING)) u_gen (
    .clk, .rst, .en(en && data_mode), .mode, .word(gen_word));

  logic [5:0] cap_mem [CAP_DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      pre_cnt       <= '0;
      preamble_done <= 1'b0;
      cap_addr      <= '0;
      cap_full      <= 1'b0;
      word          <= '0;
    end else if (en) begin
      if (!data_mode) begin
        word    <= pre_word[ram_idx];
        pre_cnt <= pre_cnt + 9'd1;
        if (pre_cnt + 9'd1 >= pre_last) preamble_done <= 1'b1;
      end else begin
        preamble_done <= 1'b1;
        word          <= gen_word;
        if (!cap_full) begin
          cap_addr <= cap_addr + 1'b1;
          if (cap_addr == CAW'(CAP_DEPTH - 1)) cap_full <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (!rst && en && data_mode && !cap_full) cap_mem[cap_addr] <= gen_word;

  always_ff @(posedge clk) cap_rdata <= cap_mem[cap_raddr];

  symbol_mapper u_map (.data(word), .mode, .i_out(sym_i), .q_out(sym_q));
endmodule
