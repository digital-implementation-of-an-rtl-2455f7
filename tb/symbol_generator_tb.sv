// Testbench for symbol_generator: a reference model of the six maximal-length LFSRs
// (lengths 32, 33, 35, 36, 39, 41 with their standard taps, same seeds) predicts every
// word for all six modulation modes, including the zeroed unused bits; a second
// instance with another wiring must give the same bits in permuted order. The bit
// balance of each word bit is checked over 3000 symbols.
module symbol_generator_tb;
  import emu_pkg::*;
  logic clk, rst, en;
  initial begin clk = 1'b0; rst = 1'b1; en = 1'b0; forever #5 clk = ~clk; end
  logic [2:0] mode;
  logic [5:0] word, word2;
  int checks = 0, failures = 0;

  localparam logic [40:0] SEEDS [6] = '{41'h0_1234_5678, 41'h1_8765_4321, 41'h2_5A5A_A5A5,
                                        41'h0_DEAD_BEEF, 41'h1_F0F0_0F0F, 41'h0_C3C3_3C3C};
  symbol_generator #(.SEEDS(SEEDS), .WIRING('{0, 1, 2, 3, 4, 5})) dut (
    .clk, .rst, .en, .mode, .word);
  symbol_generator #(.SEEDS(SEEDS), .WIRING('{5, 4, 3, 2, 1, 0})) dut2 (
    .clk, .rst, .en, .mode, .word(word2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference: register s1..sL in bits 0..L-1, feedback = xor of tap stages
  int unsigned lens [6] = '{32, 33, 35, 36, 39, 41};
  int unsigned taps [6][4] = '{'{32, 22, 2, 1}, '{33, 20, 0, 0}, '{35, 33, 0, 0},
                               '{36, 25, 0, 0}, '{39, 35, 0, 0}, '{41, 38, 0, 0}};
  logic [40:0] st [6];

  function automatic int bps(int m);
    return (m <= 1) ? 2 : m + 1;
  endfunction

  initial begin
    int ones [6];
    mode = 3'd5;
    for (int g = 0; g < 6; g++) begin
      st[g] = SEEDS[g] & ((41'd1 << lens[g]) - 1);
      ones[g] = 0;
    end
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      logic [5:0] b, exp_w, exp_w2;
      mode = 3'(n % 6);
      #1;
      for (int g = 0; g < 6; g++) b[g] = st[g][lens[g]-1];
      exp_w = '0; exp_w2 = '0;
      for (int j = 0; j < bps(int'(mode)); j++) begin
        exp_w[j]  = b[j];
        exp_w2[j] = b[5 - j];
      end
      chk(word == exp_w, $sformatf("word %0d mode %0d: %b vs %b", n, mode, word, exp_w));
      chk(word2 == exp_w2, "second wiring");
      for (int g = 0; g < 6; g++) ones[g] += int'(b[g]);
      // advance the model and the circuit
      for (int g = 0; g < 6; g++) begin
        logic fb;
        fb = 1'b0;
        for (int t = 0; t < 4; t++) if (taps[g][t] != 0) fb ^= st[g][taps[g][t]-1];
        st[g] = {st[g][39:0], fb} & ((41'd1 << lens[g]) - 1);
      end
      en = 1'b1; @(negedge clk); en = 1'b0;
      if (n % 3 == 0) @(negedge clk);     // enables need not be regular
    end
    for (int g = 0; g < 6; g++) chk(ones[g] > 1350 && ones[g] < 1650, "bit balance");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
