// Testbench for main_tx_data: programs random preamble words, then checks that the
// first pre_len symbols are the preamble words of the selected RAM, that
// preamble_done rises with the last one, that the following words are the
// pseudorandom generator's sequence (compared with a separately instantiated
// generator that is enabled only after the preamble; the word sent is the generator
// output present at the symbol enable, which then advances), that the mapper outputs match
// the word, that the capture RAM holds exactly the first CAP_DEPTH data words and then
// raises cap_full, and that pre_len = 0 starts directly in data mode. Latency: the word
// must be valid one clock after the symbol enable.
module main_tx_data_tb;
  import emu_pkg::*;
  localparam int CAPD = 64;
  localparam logic [40:0] SEEDS [6] = '{41'h0_1234_5678, 41'h1_8765_4321, 41'h2_5A5A_A5A5,
                                        41'h0_DEAD_BEEF, 41'h1_F0F0_0F0F, 41'h0_C3C3_3C3C};
  logic clk, rst;
  initial begin clk = 1'b0; rst = 1'b1; forever #5 clk = ~clk; end
  logic en, pre_we, pdone, cfull, ref_en;
  logic [2:0] mode, pre_ram;
  logic [8:0] pre_len;
  logic [7:0] pre_addr;
  logic [5:0] pre_wdata, word, cap_rdata, ref_word;
  logic [5:0] cap_raddr;
  sym_t si, sq, ei, eq;
  int checks = 0, failures = 0;

  main_tx_data #(.CAP_DEPTH(CAPD), .SEEDS(SEEDS)) dut (
    .clk, .rst, .en, .mode, .pre_len, .pre_we, .pre_ram, .pre_addr, .pre_wdata,
    .word, .sym_i(si), .sym_q(sq), .preamble_done(pdone), .cap_raddr, .cap_rdata,
    .cap_full(cfull));
  symbol_generator #(.SEEDS(SEEDS)) ref_gen (.clk, .rst, .en(ref_en), .mode, .word(ref_word));
  symbol_mapper ref_map (.data(word), .mode, .i_out(ei), .q_out(eq));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [5:0] pre [256];
  logic [5:0] data_words [$];

  task automatic run(logic [2:0] m, int plen, int nsym);
    int ridx, w;
    logic [5:0] exp;
    ridx = (m <= 3'd1) ? 0 : int'(m) - 1;
    w = ridx + 2;
    rst = 1'b1; en = 1'b0; ref_en = 1'b0; mode = m; pre_len = 9'(plen);
    data_words.delete();
    for (int a = 0; a < 256; a++) begin
      pre[a] = 6'($urandom_range((1 << w) - 1));
      @(negedge clk);
      pre_we = 1'b1; pre_ram = 3'(ridx); pre_addr = 8'(a); pre_wdata = pre[a];
    end
    @(negedge clk);
    pre_we = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    for (int s = 0; s < nsym; s++) begin
      repeat (3) @(negedge clk);
      exp = ref_word;
      en = 1'b1; ref_en = (s >= plen);
      @(negedge clk);
      en = 1'b0; ref_en = 1'b0;
      if (s < plen) chk(word == pre[s], "preamble word");
      else begin
        chk(word == exp, "generator word");
        data_words.push_back(word);
      end
      chk(si == ei && sq == eq, "mapper output");
      chk(pdone == (s >= plen - 1), "preamble_done");
      chk(cfull == (s - plen + 1 >= CAPD), "cap_full");
    end
    for (int a = 0; a < CAPD && a < data_words.size(); a++) begin
      @(negedge clk);
      cap_raddr = 6'(a);
      @(negedge clk);
      chk(cap_rdata == data_words[a], "capture RAM contents");
    end
  endtask

  initial begin
    en = 1'b0; pre_we = 1'b0; pre_ram = '0; pre_addr = '0; pre_wdata = '0; cap_raddr = '0;
    ref_en = 1'b0; mode = MOD_16QAM; pre_len = '0;
    run(MOD_16QAM, 20, 100);
    run(MOD_64QAM, 0, 80);
    run(MOD_QPSK1, 256, 300);
    run(MOD_8QAM, 1 + $urandom_range(30), 60);
    run(MOD_32QAM, 5, 90);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
