// boom_rs_erasure_decoder_tb: checks decoding with a known dead chip.
// Reference codewords come from the table-based encoder of boom_tb_pkg. For
// each, one chip pair (D2g/D2g+1, or E2l/E2l+1 of a check chip) is declared
// erased. The word must come back as the original, with the added values
// reported, when the erased pair is clean or holds any values. Any further
// damage (one more symbol, a second chip pair, a pin-shaped pair) must be
// flagged uncorrectable, never passed as clean.
module boom_rs_erasure_decoder_tb;
  import boom_ecc_pkg::*;
  import boom_tb_pkg::*;

  cw_t             rx, corrected;
  logic [1:0][5:0] ep;
  sym_t [1:0]      err_mag;
  logic            unc;
  int checks = 0, failures = 0;

  boom_rs_erasure_decoder dut (.rx, .ep, .corrected, .err_mag, .uncorrectable(unc));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void put(cw_a r);
    for (int i = 0; i < 36; i++) rx[i] = r[i];
  endfunction

  task automatic expect_fixed(cw_a good, cw_a r, int p0, int p1);
    checks += 3;
    if (unc !== 1'b0) failures++;
    for (int i = 0; i < 36; i++)
      if (corrected[i] !== good[i]) begin
        failures++;
        if (failures < 6) $display("pos %0d: got %h want %h", i, corrected[i], good[i]);
        break;
      end
    if (err_mag[0] !== (r[p0] ^ good[p0]) || err_mag[1] !== (r[p1] ^ good[p1])) failures++;
  endtask

  task automatic expect_flag(string what);
    checks++;
    if (unc !== 1'b1) begin
      failures++;
      if (failures < 6) $display("%s not flagged", what);
    end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      byte_t d [32];
      cw_a   c, r;
      int    p0, p1, q;
      for (int i = 0; i < 32; i++) d[i] = byte_t'($urandom);
      c = encode(d);
      // erased chip pair
      if (n % 6 == 5) p0 = 2 * $urandom_range(1);
      else            p0 = 4 + 2 * $urandom_range(15);
      p1 = p0 + 1;
      ep[0] = 6'(p0);
      ep[1] = 6'(p1);
      // clean
      put(c);
      #1 expect_fixed(c, c, p0, p1);
      // erased chip reads garbage (either symbol may happen to be right)
      r = c;
      r[p0] ^= byte_t'($urandom_range(255));
      r[p1] ^= byte_t'($urandom_range(255, 1));
      put(r);
      #1 expect_fixed(c, r, p0, p1);
      // plus one more symbol
      do q = $urandom_range(35); while (q == p0 || q == p1);
      r[q] ^= byte_t'($urandom_range(255, 1));
      put(r);
      #1 expect_flag("extra symbol");
      // plus a second chip pair instead
      r = c;
      r[p0] ^= byte_t'($urandom_range(255, 1));
      do q = 4 + 2 * $urandom_range(15); while (q == p0);
      r[q] ^= byte_t'($urandom_range(255, 1));
      r[q + 1] ^= byte_t'($urandom_range(255, 1));
      put(r);
      #1 expect_flag("second chip");
      // plus a pin-shaped pair D(i), D(i+16) away from the erased chip
      r = c;
      r[p1] ^= byte_t'($urandom_range(255, 1));
      do q = 4 + $urandom_range(15); while (q == p0 || q == p1 || q + 16 == p0 || q + 16 == p1);
      r[q] ^= 8'h22;
      r[q + 16] ^= 8'h20;
      put(r);
      #1 expect_flag("pin");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
