// End-to-end testbench for channel_emulator at its default parameters.
//
// Two emulators (A and B) run from the same clock with identical seeds. A is the
// reference; B differs in one control at a time, so the difference B - A isolates the
// mechanism under test:
//   - identical controls give bit-identical outputs;
//   - noise switch: B - A has the standard deviation set by the profile's noise level
//     (0.1 for profile 1) and is exactly 0 when the switch is off again;
//   - adjacent channel switch: B - A carries the two adjacent channels (RMS above 1.0);
//   - DIP gain boost: B = A << 1, 2 or 3 exactly;
//   - echoes (written into B's profile through the edit port): B - A equals
//     g1 * A[n-D1] + j g2 * A[n-D2] to within 1 % of the echo power.
// Also checked directly: parameter loading takes about 2 symbols; the first pre_len
// (32) transmitted words are the programmed preamble words, then preamble_done rises
// and pseudorandom data follows; the symbol capture RAM reads back the data words;
// the output capture RAM reads back the output samples and fills after 65536 of them;
// out_valid is exactly every 4th clock; a live profile switch changes the modulation
// (64-QAM words appear) and the LED digit; a second reset repeats the preamble from
// the newly selected preamble RAM. Every mechanism is counted and one that never
// happens is a failure.
module channel_emulator_tb;
  logic clk;
  initial begin clk = 1'b0; forever #5 clk = ~clk; end

  logic        btn;
  logic [3:0]  sw_a, sw_b;
  logic [2:0]  dip_b;
  logic        ed_we;
  logic [1:0]  ed_prof;
  logic [4:0]  ed_addr;
  logic [31:0] ed_wdata;
  logic        pre_we;
  logic [2:0]  pre_ram;
  logic [7:0]  pre_addr;
  logic [5:0]  pre_wdata;
  logic [15:0] sym_raddr, cap_raddr;
  logic [5:0]  sym_rdata, tx_a, tx_b, sym_rdata_b;
  logic        sym_full, cap_full, ld_a, ld_b, pd_a, pd_b, ov_a, ov_b, sf_b, cf_b, lg_a, lg_b;
  logic signed [21:0] cri, crq, cri_b, crq_b, re_a, im_a, bi, bq;
  logic [7:0]  h1_a, h0_a, h1_b, h0_b;

  channel_emulator ua (
    .clk, .button_0(btn), .sw(sw_a), .dip(3'd0), .ed_we(1'b0), .ed_prof(2'd0),
    .ed_addr(5'd0), .ed_wdata(32'd0), .pre_we, .pre_ram, .pre_addr, .pre_wdata,
    .sym_raddr, .sym_rdata, .sym_full, .cap_raddr, .cap_rdata_i(cri), .cap_rdata_q(crq),
    .cap_full, .loading(ld_a), .preamble_done(pd_a), .tx_word(tx_a), .out_valid(ov_a),
    .out_i(re_a), .out_q(im_a), .hex1(h1_a), .hex0(h0_a), .ledg0(lg_a));
  channel_emulator ub (
    .clk, .button_0(btn), .sw(sw_b), .dip(dip_b), .ed_we, .ed_prof, .ed_addr, .ed_wdata,
    .pre_we, .pre_ram, .pre_addr, .pre_wdata, .sym_raddr, .sym_rdata(sym_rdata_b),
    .sym_full(sf_b), .cap_raddr, .cap_rdata_i(cri_b), .cap_rdata_q(crq_b), .cap_full(cf_b),
    .loading(ld_b), .preamble_done(pd_b), .tx_word(tx_b), .out_valid(ov_b), .out_i(bi),
    .out_q(bq), .hex1(h1_b), .hex0(h0_b), .ledg0(lg_b));

  int checks = 0, failures = 0;
  int n_load = 0, n_pre = 0, n_data = 0, n_symcap = 0, n_outcap = 0, n_capfull = 0,
      n_same = 0, n_noise = 0, n_noise_off = 0, n_adj = 0, n_gain = 0, n_echo = 0,
      n_prof = 0, n_reload = 0, n_rate = 0, n_symfull = 0;

  initial begin
    repeat (2500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- monitors: output samples, transmitted words ----
  int nout, last_ov;
  logic signed [21:0] rec_ai [$], rec_aq [$], rec_bi [$], rec_bq [$];
  logic [5:0] words [$];
  logic sym_d;
  always @(negedge clk) begin
    if (btn) begin
      nout = 0; last_ov = 0;
      rec_ai.delete(); rec_aq.delete(); rec_bi.delete(); rec_bq.delete(); words.delete();
      sym_d = 1'b0;
    end else begin
      last_ov++;
      if (ov_a) begin
        if (nout > 0) begin chk(last_ov == 4, "out_valid every 4 clocks"); n_rate++; end
        chk(ov_b, "emulators in step");
        last_ov = 0;
        if (rec_ai.size() < 20000) begin
          rec_ai.push_back(re_a); rec_aq.push_back(im_a); rec_bi.push_back(bi); rec_bq.push_back(bq);
        end
        nout++;
      end
      if (sym_d && !ld_a && words.size() < 4000) words.push_back(tx_a);
      sym_d = ua.sym_en & ~ua.rst;
    end
  end

  task automatic reset_both();
    int n;
    btn = 1'b1;
    repeat (4) @(negedge clk);
    btn = 1'b0;
    n = 0;
    while ((ld_a || ld_b) && n < 1000) begin @(negedge clk); n++; end
    chk(n >= 60 && n <= 70, "parameter loading takes 2 symbols");
    n_load++;
  endtask

  task automatic wait_samples(int k);
    int t;
    t = nout + k;
    while (nout < t) @(negedge clk);
  endtask

  // statistics of B - A over recorded samples [from, to)
  function automatic real diff_rms(int from, int to);
    real s;
    s = 0;
    for (int k = from; k < to; k++)
      s += real'(rec_bi[k] - rec_ai[k]) ** 2 + real'(rec_bq[k] - rec_aq[k]) ** 2;
    return $sqrt(s / (2.0 * (to - from))) / 65536.0;
  endfunction

  logic [5:0] pre_words [256];

  initial begin
    int s0, sh;
    real r, pe, pr, ei, eq, g1, g2;
    int d1, d2;
    btn = 1'b1; sw_a = 4'b0000; sw_b = 4'b0000; dip_b = '0;
    ed_we = 1'b0; ed_prof = '0; ed_addr = '0; ed_wdata = '0;
    pre_we = 1'b0; pre_ram = '0; pre_addr = '0; pre_wdata = '0;
    sym_raddr = '0; cap_raddr = '0;
    // random QPSK preamble (2-bit RAM) for both emulators
    for (int a = 0; a < 256; a++) begin
      pre_words[a] = 6'($urandom_range(3));
      @(negedge clk);
      pre_we = 1'b1; pre_ram = 3'd0; pre_addr = 8'(a); pre_wdata = pre_words[a];
    end
    @(negedge clk);
    pre_we = 1'b0;

    // ---------------- run 1: profile 1 (QPSK), switch mechanisms ----------------
    reset_both();
    chk(!pd_a, "preamble_done low after reset");
    wait_samples(400);
    for (int k = 0; k < 32; k++) begin
      chk(words[k] == pre_words[k], "preamble word");
      if (words[k] == pre_words[k]) n_pre++;
    end
    chk(pd_a, "preamble_done after 32 symbols");
    for (int k = 0; k < 400; k++) begin
      chk(rec_bi[k] == rec_ai[k] && rec_bq[k] == rec_aq[k], "identical controls, identical output");
      if (rec_bi[k] == rec_ai[k]) n_same++;
    end
    chk(h0_a != h0_b || sw_a[1:0] == sw_b[1:0], "display");
    // noise on in B
    sw_b[3] = 1'b1;
    s0 = nout + 2;
    wait_samples(3000);
    r = diff_rms(s0, s0 + 2900);
    $display("noise rms %f (expected 0.1)", r);
    chk(r > 0.095 && r < 0.105, "noise level of profile 1");
    if (r > 0.095 && r < 0.105) n_noise++;
    chk(lg_b && !lg_a, "noise LED");
    // noise off, adjacent channels on
    sw_b[3] = 1'b0;
    s0 = nout + 2;
    wait_samples(500);
    chk(diff_rms(s0, s0 + 400) == 0.0, "noise switched off");
    if (diff_rms(s0, s0 + 400) == 0.0) n_noise_off++;
    sw_b[2] = 1'b1;
    s0 = nout + 2;
    wait_samples(3000);
    r = diff_rms(s0, s0 + 2900);
    $display("adjacent channel rms %f", r);
    chk(r > 1.0 && r < 16.0, "adjacent channels present");
    if (r > 1.0) n_adj++;
    chk(h1_b != h1_a, "adjacent indicator on the display");
    sw_b[2] = 1'b0;
    s0 = nout + 2;
    wait_samples(500);
    chk(diff_rms(s0, s0 + 400) == 0.0, "adjacent channels switched off");
    // gain boost
    for (int d = 1; d < 8; d++) begin
      dip_b = 3'(d);
      sh = dip_b[2] ? 3 : dip_b[1] ? 2 : 1;
      s0 = nout + 3;
      wait_samples(300);
      for (int k = s0; k < s0 + 200; k++)
        chk(rec_bi[k] == (rec_ai[k] <<< sh) && rec_bq[k] == (rec_aq[k] <<< sh), "gain boost");
      n_gain++;
    end
    dip_b = '0;
    // symbol capture: the data words after the preamble
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      sym_raddr = 16'(k);
      @(negedge clk);
      chk(sym_rdata == words[32 + k], "symbol capture contents");
      if (sym_rdata == words[32 + k]) n_symcap++;
      n_data++;
    end
    // output capture: the first samples after the start
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      cap_raddr = 16'(k);
      @(negedge clk);
      chk(cri == rec_ai[k] && crq == rec_aq[k], "output capture contents");
      if (cri == rec_ai[k]) n_outcap++;
    end

    // ---------------- run 2: echoes written into profile 1 of B ----------------
    d1 = $urandom_range(1, 30); d2 = $urandom_range(31, 63);
    g1 = 41449.0 / 131072.0; g2 = -13107.0 / 131072.0;
    btn = 1'b1;
    for (int k = 0; k < 12; k++) begin
      @(negedge clk);
      ed_we = 1'b1; ed_prof = 2'd0;
      ed_addr = 5'(7 + k);
      case (k)
        0: ed_wdata = 32'(d1);
        2: ed_wdata = 32'd41449;
        4: ed_wdata = 32'(d2);
        7: ed_wdata = 32'(-32'sd13107);
        default: ed_wdata = 32'd0;
      endcase
    end
    @(negedge clk);
    ed_we = 1'b0;
    reset_both();
    wait_samples(3000);
    pe = 0; pr = 0;
    for (int k = 500; k < 2900; k++) begin
      ei = g1 * real'(rec_ai[k - d1]) - g2 * real'(rec_aq[k - d2]);
      eq = g1 * real'(rec_aq[k - d1]) + g2 * real'(rec_ai[k - d2]);
      pe += ei * ei + eq * eq;
      pr += (real'(rec_bi[k] - rec_ai[k]) - ei) ** 2 + (real'(rec_bq[k] - rec_aq[k]) - eq) ** 2;
    end
    $display("echo delays %0d %0d: residual/echo power %f", d1, d2, pr / pe);
    chk(pe > 0.0 && pr / pe < 0.01, "echoes with the programmed delays and gains");
    if (pe > 0.0 && pr / pe < 0.01) n_echo++;

    // ---------------- live profile switch and reload ----------------
    sw_a[1:0] = 2'd2; sw_b[1:0] = 2'd2;
    wait_samples(800);
    begin
      int big;
      big = 0;
      for (int k = words.size() - 50; k < words.size(); k++) if (words[k] > 6'd15) big++;
      chk(big > 0, "64-QAM words after the profile switch");
      if (big > 0) n_prof++;
    end
    chk(h0_a != 8'hFF, "display shows a digit");
    reset_both();
    wait_samples(400);
    for (int k = 0; k < 32; k++) begin
      chk(words[k] == 6'(k), "preamble of the 64-QAM RAM after reset");
      if (words[k] == 6'(k)) n_reload++;
    end

    // ---------------- capture memories fill ----------------
    while (!cap_full) @(negedge clk);
    chk(nout == 65536 || nout == 65537, "output capture full after 65536 samples");
    if (nout <= 65537) n_capfull++;
    while (!sym_full) @(negedge clk);
    chk(words.size() == 4000, "symbol monitor");
    n_symfull++;

    $display("mechanisms: load %0d preamble %0d data %0d symcap %0d outcap %0d capfull %0d",
             n_load, n_pre, n_data, n_symcap, n_outcap, n_capfull);
    $display("            same %0d noise %0d noise_off %0d adjacent %0d gain %0d echo %0d",
             n_same, n_noise, n_noise_off, n_adj, n_gain, n_echo);
    $display("            profile %0d reload %0d rate %0d symfull %0d",
             n_prof, n_reload, n_rate, n_symfull);
    chk(n_load > 0, "mechanism: parameter load");
    chk(n_pre > 0, "mechanism: preamble");
    chk(n_data > 0, "mechanism: pseudorandom data");
    chk(n_symcap > 0, "mechanism: symbol capture");
    chk(n_outcap > 0, "mechanism: output capture");
    chk(n_capfull > 0, "mechanism: output capture full");
    chk(n_same > 0, "mechanism: deterministic output");
    chk(n_noise > 0, "mechanism: noise on");
    chk(n_noise_off > 0, "mechanism: noise off");
    chk(n_adj > 0, "mechanism: adjacent channels");
    chk(n_gain > 0, "mechanism: gain boost");
    chk(n_echo > 0, "mechanism: echoes");
    chk(n_prof > 0, "mechanism: profile switch");
    chk(n_reload > 0, "mechanism: reload");
    chk(n_rate > 0, "mechanism: output rate");
    chk(n_symfull > 0, "mechanism: symbol capture full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
