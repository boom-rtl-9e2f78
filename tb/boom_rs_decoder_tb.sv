// boom_rs_decoder_tb: checks the RS(36,32) strip decoder.
// Reference codewords come from the table-based encoder of boom_tb_pkg. Each is
// presented clean, with one random symbol error, with two random symbol errors,
// with a chip-shaped pair and with a pin-shaped pair; the decoder must return the
// original codeword, the right error count and positions, and must not flag it.
// Words with three errors must never come back as the original with a clean flag
// (they are either flagged or miscorrected to another codeword); at least some
// must be flagged.
module boom_rs_decoder_tb;
  import boom_ecc_pkg::*;
  import boom_tb_pkg::*;

  cw_t             rx, corrected;
  logic [1:0]      n_err;
  logic [1:0][5:0] err_pos;
  sym_t [1:0]      err_mag;
  logic            unc;
  int checks = 0, failures = 0;

  boom_rs_decoder dut (.rx, .corrected, .n_err, .err_pos, .err_mag, .uncorrectable(unc));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input cw_a good, input int nerr, input int p0, input int p1);
    // reported error values must be what was added at the reported positions
    if (nerr >= 1) begin
      checks++;
      for (int k = 0; k < nerr; k++)
        if (err_mag[k] !== (rx[err_pos[k]] ^ good[err_pos[k]])) begin
          failures++;
          break;
        end
    end
    checks++;
    for (int i = 0; i < 36; i++)
      if (corrected[i] !== good[i]) begin
        failures++;
        if (failures < 6) $display("nerr=%0d pos %0d: got %h want %h", nerr, i, corrected[i], good[i]);
        break;
      end
    checks++;
    if (unc !== 1'b0 || int'(n_err) != nerr) begin
      failures++;
      if (failures < 6) $display("nerr=%0d: n_err=%0d unc=%b", nerr, n_err, unc);
    end
    if (nerr >= 1) begin
      checks++;
      if (nerr == 1 && int'(err_pos[0]) != p0) failures++;
      if (nerr == 2 && !((int'(err_pos[0]) == p0 && int'(err_pos[1]) == p1) ||
                         (int'(err_pos[0]) == p1 && int'(err_pos[1]) == p0))) failures++;
    end
  endtask

  initial begin
    int flagged3 = 0;
    for (int n = 0; n < 200; n++) begin
      byte_t d [32];
      cw_a   c, r;
      int    p0, p1, p2;
      for (int i = 0; i < 32; i++) d[i] = byte_t'($urandom);
      c = encode(d);
      // clean
      for (int i = 0; i < 36; i++) rx[i] = c[i];
      #1 check(c, 0, 0, 0);
      // one error
      p0 = $urandom_range(35);
      r = c;
      r[p0] ^= byte_t'($urandom_range(255, 1));
      for (int i = 0; i < 36; i++) rx[i] = r[i];
      #1 check(c, 1, p0, 0);
      // two errors
      p0 = $urandom_range(35);
      do p1 = $urandom_range(35); while (p1 == p0);
      r = c;
      r[p0] ^= byte_t'($urandom_range(255, 1));
      r[p1] ^= byte_t'($urandom_range(255, 1));
      for (int i = 0; i < 36; i++) rx[i] = r[i];
      #1 check(c, 2, p0, p1);
      // chip-shaped pair: D(2g), D(2g+1)
      p0 = 4 + 2 * $urandom_range(15);
      r = c;
      r[p0] ^= byte_t'($urandom_range(255, 1));
      r[p0 + 1] ^= byte_t'($urandom_range(255, 1));
      for (int i = 0; i < 36; i++) rx[i] = r[i];
      #1 check(c, 2, p0, p0 + 1);
      // pin-shaped pair: D(i), D(i+16)
      p0 = 4 + $urandom_range(15);
      r = c;
      r[p0] ^= 8'h11;
      r[p0 + 16] ^= 8'h10;
      for (int i = 0; i < 36; i++) rx[i] = r[i];
      #1 check(c, 2, p0, p0 + 16);
      // three errors
      p0 = $urandom_range(35);
      do p1 = $urandom_range(35); while (p1 == p0);
      do p2 = $urandom_range(35); while (p2 == p0 || p2 == p1);
      r = c;
      r[p0] ^= byte_t'($urandom_range(255, 1));
      r[p1] ^= byte_t'($urandom_range(255, 1));
      r[p2] ^= byte_t'($urandom_range(255, 1));
      for (int i = 0; i < 36; i++) rx[i] = r[i];
      #1;
      checks++;
      if (unc) flagged3++;
      else begin
        cw_a k;
        bit same;
        same = 1;
        for (int i = 0; i < 36; i++) begin k[i] = corrected[i]; if (corrected[i] != c[i]) same = 0; end
        if (same) failures++;
        for (int j = 0; j < 4; j++) if (syndrome(k, j) != 0) begin failures++; break; end
      end
    end
    checks++;
    if (flagged3 < 100) begin
      failures++;
      $display("only %0d of 200 triple errors flagged", flagged3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
