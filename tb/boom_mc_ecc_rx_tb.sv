// boom_mc_ecc_rx_tb: checks the controller read path.
// Blocks encoded by the reference model are streamed back to back as 16 DBUS
// beats each, clean or with a fault: a whole x8 chip inverted (any of the 18 chip
// positions of a strip), an external pin inverted in every beat (any of the 72),
// one random symbol, or three chips at once. The block must come back corrected,
// two cycles after its last beat, with the right class and chip or pin number;
// the triple-chip fault must be reported uncorrectable. Every fourth block is a
// 64-byte one, sent as its first 8 beats only: it must come back as the lower
// half with blk_half set and the upper half zero. Last, a burst cut short after
// 5 beats must raise framing_error exactly once. In erasure mode (a chip
// declared dead) blocks with that chip dead must be corrected and classed as
// that chip, and blocks with a second dead chip or a dead pin must be flagged.
module boom_mc_ecc_rx_tb;
  import boom_pkg::*;
  import boom_ecc_pkg::*;
  import boom_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic dbus_valid = 0, dbus_last = 0;
  logic [71:0] dbus_data = '0;
  logic blk_valid, framing_error, blk_half;
  logic erase_valid = 0;
  logic [4:0] erase_chip = '0;
  logic [1023:0] blk;
  fail_e [3:0] strip_cls;
  fail_e cls;
  logic [4:0] chip;
  logic [6:0] pin;
  int checks = 0, failures = 0;

  boom_mc_ecc_rx dut (.clk, .rst_n, .dbus_valid, .dbus_data, .dbus_last, .erase_valid, .erase_chip, .blk_valid, .blk, .blk_half,
                      .strip_cls, .cls, .chip, .pin, .framing_error);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [1023:0] data;
    fail_e         cls;
    int            chip;
    int            pin;
    int            last_cycle;
    logic          half;
    bit            bad;
  } exp_t;
  exp_t exp_q [$];
  int cycle = 0, n_frame = 0;
  always @(posedge clk) if (rst_n && framing_error) n_frame++;
  int last_q [$];
  always @(posedge clk) begin
    if (rst_n && dbus_valid && dbus_last) last_q.push_back(cycle);
    cycle <= cycle + 1;
  end

  // checker
  always @(posedge clk) if (rst_n && blk_valid) begin
    exp_t e;
    checks += 4;
    if (exp_q.size() == 0) failures++;
    else begin
      e = exp_q.pop_front();
      if (e.bad) e.cls = cls;  // a broken burst carries no data to check
      if (blk_half !== e.half) failures++;
      if (e.cls != FAIL_UNCORR && !e.bad && blk !== e.data) begin
        failures++;
        if (failures < 6) $display("block data wrong (class %0d)", e.cls);
      end
      if (cls !== e.cls || (e.cls == FAIL_CHIP && int'(chip) != e.chip) ||
          (e.cls == FAIL_PIN && int'(pin) != e.pin)) begin
        failures++;
        if (failures < 6) $display("class %0d chip %0d pin %0d, want %0d %0d %0d", cls, chip, pin, e.cls, e.chip, e.pin);
      end
      e.last_cycle = last_q.pop_front();
      if (cycle - e.last_cycle != 2) begin
        failures++;
        $display("latency %0d", cycle - e.last_cycle);
      end
    end
  end

  task automatic send(input logic [71:0] beats [16], input exp_t e);
    for (int t = 0; t < (e.half ? 8 : 16); t++) begin
      dbus_valid <= 1;
      dbus_data  <= beats[t];
      dbus_last  <= (t == (e.half ? 7 : 15));
      @(posedge clk);
    end
    exp_q.push_back(e);
  endtask

  initial begin
    logic [71:0] beats [16];
    exp_t e;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      int kind;
      e.data = rand_block();
      block_to_beats(e.data, beats);
      e.chip = 0; e.pin = 0; e.bad = 0;
      e.half = (n % 4 == 2);
      if (e.half) e.data[1023:512] = '0;
      kind = n % 5;
      case (kind)
        0: e.cls = FAIL_NONE;
        1: begin // chip: slot s of lane l; bits s*8.. in beats of that lane
          int l, s;
          l = $urandom_range(1); s = $urandom_range(8);
          for (int t = 0; t < 16; t++) if (t % 2 == l) beats[t][s * 8 +: 8] = ~beats[t][s * 8 +: 8];
          e.cls = FAIL_CHIP; e.chip = (s == 8) ? 16 + l : l * 8 + s;
        end
        2: begin // external pin p inverted on every beat
          int p;
          p = $urandom_range(71);
          for (int t = 0; t < 16; t++) beats[t][p] = ~beats[t][p];
          e.cls = FAIL_PIN; e.pin = p;
        end
        3: begin // one symbol: one nibble of one chip in one strip
          int st, l, s, h;
          st = $urandom_range(e.half ? 1 : 3); l = $urandom_range(1); s = $urandom_range(8); h = $urandom_range(1);
          beats[4 * st + l][s * 8 + 4 * h +: 4] ^= 4'h9;
          e.cls = FAIL_SINGLE;
        end
        default: begin // three chips of lane 0
          for (int t = 0; t < 16; t += 2) begin
            beats[t][7:0] = ~beats[t][7:0];
            beats[t][23:16] = ~beats[t][23:16];
            beats[t][47:40] = ~beats[t][47:40];
          end
          e.cls = FAIL_UNCORR;
        end
      endcase
      send(beats, e);
      if (n % 7 == 3) begin
        dbus_valid <= 0;
        dbus_last  <= 0;
        repeat (3) @(posedge clk);
      end
    end
    dbus_valid <= 0;
    dbus_last  <= 0;
    repeat (5) @(posedge clk);
    checks += 2;
    if (n_frame != 0) failures++;
    // erasure mode
    for (int n = 0; n < 40; n++) begin
      int l, s, l2, s2;
      l = n % 2; s = (n / 2) % 9;
      e.data = rand_block();
      block_to_beats(e.data, beats);
      e.half = 0; e.bad = 0; e.pin = 0;
      e.chip = (s == 8) ? 16 + l : l * 8 + s;
      for (int t = 0; t < 16; t++) if (t % 2 == l) beats[t][s * 8 +: 8] = ~beats[t][s * 8 +: 8];
      e.cls = FAIL_CHIP;
      if (n % 4 == 1) begin   // a second chip
        l2 = 1 - l; s2 = (s + 3) % 9;
        for (int t = 0; t < 16; t++) if (t % 2 == l2) beats[t][s2 * 8 +: 8] ^= 8'h5a;
        e.cls = FAIL_UNCORR;
      end else if (n % 4 == 3) begin   // a dead pin away from the chip
        int p;
        p = (s * 8 + 20) % 72;
        for (int t = 0; t < 16; t++) beats[t][p] = ~beats[t][p];
        e.cls = FAIL_UNCORR;
      end
      erase_valid <= 1;
      erase_chip  <= 5'(e.chip);
      send(beats, e);
      // the erased chip is a setting that stays put while a block is decoded
      dbus_valid <= 0;
      dbus_last  <= 0;
      repeat (3) @(posedge clk);
    end
    dbus_valid <= 0;
    dbus_last  <= 0;
    repeat (5) @(posedge clk);
    erase_valid <= 0;
    // a burst that ends after 5 beats
    e.bad = 1; e.half = 0;
    for (int t = 0; t < 5; t++) begin
      dbus_valid <= 1;
      dbus_data  <= beats[t];
      dbus_last  <= (t == 4);
      @(posedge clk);
    end
    exp_q.push_back(e);
    dbus_valid <= 0;
    dbus_last  <= 0;
    repeat (5) @(posedge clk);
    checks += 2;
    if (n_frame != 1) begin failures++; $display("framing errors %0d", n_frame); end
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
