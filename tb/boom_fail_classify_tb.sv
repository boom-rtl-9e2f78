// boom_fail_classify_tb: checks the pin/chip failure classifier on hand-built
// decoder results: every chip pair, every pin pair (data and check pins, each of
// the four bit lanes of a nibble), unrelated pairs, single and uncorrectable.
module boom_fail_classify_tb;
  import boom_ecc_pkg::*;

  logic [1:0]      n_err;
  logic [1:0][5:0] err_pos;
  sym_t [1:0]      err_mag;
  logic            unc;
  fail_e           cls;
  logic [4:0]      chip;
  logic [6:0]      pin;
  int checks = 0, failures = 0;

  boom_fail_classify dut (.n_err, .err_pos, .err_mag, .uncorrectable(unc), .cls, .chip, .pin);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cls(input fail_e want, input int want_chip, input int want_pin, input string what);
    #1;
    checks++;
    if (cls !== want || (want == FAIL_CHIP && int'(chip) != want_chip) ||
        (want == FAIL_PIN && int'(pin) != want_pin)) begin
      failures++;
      if (failures < 8) $display("%s: cls=%0d chip=%0d pin=%0d, want %0d/%0d/%0d", what, cls, chip, pin,
                                 want, want_chip, want_pin);
    end
  endtask

  initial begin
    unc = 0; n_err = 0; err_pos = '0; err_mag = '0;
    expect_cls(FAIL_NONE, 0, 0, "clean");
    n_err = 1; err_pos[0] = 6'd17; err_mag[0] = 8'h5A;
    expect_cls(FAIL_SINGLE, 0, 0, "single");
    n_err = 0; unc = 1;
    expect_cls(FAIL_UNCORR, 0, 0, "uncorrectable");
    unc = 0;
    // data chips g = 0..15: symbols D2g, D2g+1 at positions 4+2g, 5+2g
    for (int g = 0; g < 16; g++) begin
      n_err = 2; err_pos[0] = 6'(4 + 2 * g); err_pos[1] = 6'(5 + 2 * g);
      err_mag[0] = 8'hFF; err_mag[1] = 8'h3C;
      expect_cls(FAIL_CHIP, g, 0, "data chip");
    end
    // check chips: E0,E1 (lane 0) and E2,E3 (lane 1)
    for (int l = 0; l < 2; l++) begin
      n_err = 2; err_pos[0] = 6'(2 * l); err_pos[1] = 6'(2 * l + 1);
      err_mag[0] = 8'h01; err_mag[1] = 8'h80;
      expect_cls(FAIL_CHIP, 16 + l, 0, "check chip");
    end
    // data pins 0..63: slot s = pin/8, nibble = (pin%8)/4, bit k = pin%4;
    // symbols D(2s+nib) and D(16+2s+nib), error bits k and/or k+4
    for (int p = 0; p < 64; p++) begin
      int s, nib, k;
      s = p / 8; nib = (p % 8) / 4; k = p % 4;
      n_err = 2; err_pos[0] = 6'(4 + 2 * s + nib); err_pos[1] = 6'(4 + 16 + 2 * s + nib);
      err_mag[0] = 8'(8'h11 << k); err_mag[1] = 8'(8'h10 << k);
      expect_cls(FAIL_PIN, 0, p, "data pin");
    end
    // check pins 64..71: E(nib) and E(2+nib)
    for (int p = 64; p < 72; p++) begin
      int nib, k;
      nib = (p % 8) / 4; k = p % 4;
      n_err = 2; err_pos[0] = 6'(nib); err_pos[1] = 6'(2 + nib);
      err_mag[0] = 8'(8'h01 << k); err_mag[1] = 8'(8'h11 << k);
      expect_cls(FAIL_PIN, 0, p, "check pin");
    end
    // pin-shaped positions but two different bits: not one pin
    n_err = 2; err_pos[0] = 6'd14; err_pos[1] = 6'd30; err_mag[0] = 8'h01; err_mag[1] = 8'h02;
    expect_cls(FAIL_MULTI, 0, 0, "two pins");
    // unrelated symbols
    n_err = 2; err_pos[0] = 6'd5; err_pos[1] = 6'd33; err_mag[0] = 8'h01; err_mag[1] = 8'h01;
    expect_cls(FAIL_MULTI, 0, 0, "unrelated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
