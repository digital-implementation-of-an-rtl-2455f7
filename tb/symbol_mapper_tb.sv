// Testbench for symbol_mapper. QPSK (both levels), 16-QAM and 64-QAM are checked
// for every word against closed-form rules (sign bits and Gray-coded magnitudes).
// For 8-QAM and 32-QAM every word must give a distinct point on the odd grid, the
// constellation must have zero mean, the 8-QAM energy must be 160/16^2 and 32-QAM
// must use the 32 points of its grid; selected points are compared with the printed
// constellation diagrams, and neighbours must differ in one bit (Gray labelling)
// where the diagrams do.
module symbol_mapper_tb;
  import emu_pkg::*;
  logic [5:0] data;
  logic [2:0] mode;
  sym_t i_out, q_out;
  int checks = 0, failures = 0;
  symbol_mapper dut (.data, .mode, .i_out, .q_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int mag64(logic [1:0] b);   // Gray: 00,01,11,10 -> 2,6,10,14
    case (b)
      2'b00: return 2;
      2'b01: return 6;
      2'b11: return 10;
      default: return 14;
    endcase
  endfunction

  initial begin
    int si, sq, e;
    bit seen [int];
    for (int w = 0; w < 64; w++) begin
      data = 6'(w);
      mode = MOD_QPSK0; #1;
      chk(int'(i_out) == (data[1] ? 8 : -8) && int'(q_out) == (data[0] ? 8 : -8), "QPSK0");
      mode = MOD_QPSK1; #1;
      chk(int'(i_out) == (data[1] ? 12 : -12) && int'(q_out) == (data[0] ? 12 : -12), "QPSK1");
      mode = MOD_16QAM; #1;
      chk(int'(i_out) == (data[3] ? 1 : -1) * (data[1] ? 12 : 4), $sformatf("16QAM I %0d", w));
      chk(int'(q_out) == (data[2] ? 1 : -1) * (data[0] ? 12 : 4), $sformatf("16QAM Q %0d", w));
      mode = MOD_64QAM; #1;
      chk(int'(i_out) == (data[5] ? 1 : -1) * mag64({data[3], data[1]}), $sformatf("64QAM I %0d", w));
      chk(int'(q_out) == (data[4] ? 1 : -1) * mag64({data[2], data[0]}), $sformatf("64QAM Q %0d", w));
    end
    // 8-QAM
    si = 0; sq = 0; e = 0; seen.delete();
    for (int w = 0; w < 8; w++) begin
      data = 6'(w); mode = MOD_8QAM; #1;
      chk(!seen.exists(int'(i_out) * 64 + int'(q_out)), "8QAM distinct");
      seen[int'(i_out) * 64 + int'(q_out)] = 1'b1;
      chk((i_out == 4 || i_out == -4 || i_out == 12 || i_out == -12) &&
          (q_out == 4 || q_out == -4 || q_out == 12 || q_out == -12), "8QAM grid");
      si += int'(i_out); sq += int'(q_out); e += int'(i_out) ** 2 + int'(q_out) ** 2;
    end
    chk(si == 0 && sq == 0, "8QAM zero mean");
    chk(e == 8 * 160, "8QAM energy");
    // 32-QAM
    si = 0; sq = 0; seen.delete();
    for (int w = 0; w < 32; w++) begin
      data = 6'(w); mode = MOD_32QAM; #1;
      chk(!seen.exists(int'(i_out) * 64 + int'(q_out)), "32QAM distinct");
      seen[int'(i_out) * 64 + int'(q_out)] = 1'b1;
      chk(int'(i_out) % 4 != 0 && int'(q_out) % 4 != 0 && int'(i_out) % 2 == 0, "32QAM grid");
      si += int'(i_out); sq += int'(q_out);
    end
    chk(si == 0 && sq == 0, "32QAM zero mean");
    // printed points
    data = 6'b011111; mode = MOD_32QAM; #1;
    chk(i_out == -10 && q_out == 14, "32QAM 11111");
    data = 6'b000000; #1;
    chk(i_out == 2 && q_out == -14, "32QAM 00000");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
