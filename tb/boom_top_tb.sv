// boom_top_tb: end-to-end test of a BOOM channel at the default configuration
// (four quarter-rate lanes, two sub-ranks, four ranks), with boom_dram_model as
// the ranks. It
//   1. writes 32 random blocks spread over all ranks, banks and both sub-ranks
//      (the controller encodes them; the buffer deals them out to the lanes);
//   2. reads them back, one read every 16 clocks alternating sub-ranks, and
//      checks every block, that the blocks leave exactly 16 clocks apart (the
//      full DBUS rate) and that the two sub-ranks' lanes transfer at the same time;
//   3. reads with a dead chip, with a dead DBUS pin and with three dead chips, and
//      checks correction and the reported failure class, chip and pin;
//   4. sends a burst of activates to one rank to make its iABUS queue stall ABUS;
//   5. writes and reads 64-byte blocks (DBUS burst 8, lane burst 4), one read
//      every 8 clocks, also with a dead chip, and checks data, the half-block
//      flag, the internal burst length and the 8-clock spacing of the blocks;
//   6. declares a chip dead (erasure mode) and reads with that chip failed, then
//      with three chips failed of which one is the declared one: the first must
//      be corrected, the second flagged.
// Each mechanism is counted and must have happened at least once.
module boom_top_tb;
  import boom_pkg::*;
  import boom_ecc_pkg::*;
  import boom_tb_pkg::*;

  localparam int N = 4, S = 2, RANKS = 4, NBLK = 32, NHALF = 8;

  logic clk = 0, rst_n = 0;
  logic abus_valid = 0, abus_ready;
  ext_cmd_t abus_cmd = '0;
  logic wr_blk_valid = 0, wr_blk_ready;
  logic [1023:0] wr_blk = '0, rd_blk;
  logic wr_blk_half = 0, rd_blk_half;
  logic rd_blk_valid, rd_framing_error;
  bit half_phase = 0;
  logic rd_erase_valid = 0;
  logic [4:0] rd_erase_chip = '0;
  fail_e rd_cls;
  fail_e [3:0] rd_strip_cls;
  logic [4:0] rd_fail_chip;
  logic [6:0] rd_fail_pin;
  logic idbus_ce, iabus_slot;
  logic [N-1:0] iabus_valid, idbus_rd_valid, idbus_wr_valid;
  int_cmd_t [N-1:0] iabus_cmd;
  logic [N-1:0][LANE_W-1:0] idbus_rd_data, idbus_wr_data;
  logic rd_blk_start, rd_underflow, wr_orphan_beat;
  int fault_kind = 0, fault_lane = 0, fault_bit = 0;

  boom_top dut (
    .clk, .rst_n, .abus_valid, .abus_cmd, .abus_ready, .wr_blk_valid, .wr_blk, .wr_blk_half, .wr_blk_ready,
    .rd_blk_valid, .rd_blk, .rd_blk_half, .rd_cls, .rd_strip_cls, .rd_fail_chip, .rd_fail_pin, .rd_framing_error, .rd_erase_valid, .rd_erase_chip,
    .idbus_ce, .iabus_slot, .iabus_valid, .iabus_cmd, .idbus_rd_valid, .idbus_rd_data,
    .idbus_wr_valid, .idbus_wr_data, .rd_blk_start, .rd_underflow, .wr_orphan_beat);

  boom_dram_model #(.N_IDBUS(N), .SUBRANKS(S), .RANKS(RANKS)) ranks (
    .clk, .rst_n, .idbus_ce, .iabus_valid, .iabus_cmd, .idbus_rd_valid, .idbus_rd_data,
    .idbus_wr_valid, .idbus_wr_data, .fault_kind, .fault_lane, .fault_bit);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_stall = 0, n_overlap = 0, n_write = 0, n_read = 0, n_fullrate = 0;
  int n_chip = 0, n_pin = 0, n_uncorr = 0, n_xlat = 0, n_half = 0, n_half_fullrate = 0;
  int n_erase_fix = 0, n_erase_flag = 0;
  logic [1023:0] blocks [NBLK + NHALF];

  typedef struct { int n; fail_e cls; int chip; int pin; bit half; } exp_t;
  exp_t exp_q [$];
  int last_rd = -1;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors
  always @(posedge clk) if (rst_n) begin
    if (abus_valid && !abus_ready) n_stall++;
    if (idbus_rd_valid[0] && idbus_rd_valid[2]) n_overlap++;
    if (rd_underflow || wr_orphan_beat || rd_framing_error) begin
      failures++;
      $display("buffer error at %0d", cyc);
    end
    for (int b = 0; b < N; b++) if (iabus_valid[b] && (iabus_cmd[b].op == CMD_RD || iabus_cmd[b].op == CMD_WR)) begin
      checks++;
      n_xlat++;
      if (iabus_cmd[b].burst != (half_phase ? 5'd4 : 5'd8)) failures++;
    end
    if (rd_blk_valid) begin
      exp_t e;
      checks += 3;
      if (exp_q.size() == 0) begin failures++; $display("unexpected read block"); end
      else begin
        e = exp_q.pop_front();
        n_read++;
        if (rd_blk_half !== e.half) failures++;
        if (rd_blk_half) n_half++;
        if (e.cls != FAIL_UNCORR && rd_blk !== blocks[e.n]) begin
          failures++;
          $display("block %0d read back wrong (class %0d)", e.n, rd_cls);
        end
        if (rd_cls !== e.cls || (e.cls == FAIL_CHIP && int'(rd_fail_chip) != e.chip) ||
            (e.cls == FAIL_PIN && int'(rd_fail_pin) != e.pin)) begin
          failures++;
          $display("block %0d: class %0d chip %0d pin %0d, want %0d %0d %0d", e.n, rd_cls,
                   rd_fail_chip, rd_fail_pin, e.cls, e.chip, e.pin);
        end
        if (rd_erase_valid && rd_cls == FAIL_CHIP)   n_erase_fix++;
        if (rd_erase_valid && rd_cls == FAIL_UNCORR) n_erase_flag++;
        if (rd_cls == FAIL_CHIP)  n_chip++;
        if (rd_cls == FAIL_PIN)   n_pin++;
        if (rd_cls == FAIL_UNCORR) n_uncorr++;
        if (last_rd >= 0 && cyc - last_rd == 16) n_fullrate++;
        if (e.half && last_rd >= 0 && cyc - last_rd == 8) n_half_fullrate++;
        last_rd = cyc;
      end
    end
  end

  task automatic issue(input cmd_op_e op, input int n, input bit hold = 0);
    abus_valid <= 1;
    abus_cmd.op      <= op;
    abus_cmd.half    <= half_phase;
    abus_cmd.subrank <= 2'(n % S);
    abus_cmd.rank    <= 3'((n / S) % RANKS);
    abus_cmd.bank    <= 3'(n % 8);
    abus_cmd.row     <= 16'(n * 3);
    abus_cmd.col     <= 10'(n * 16);
    do @(posedge clk); while (!abus_ready);
    if (!hold) abus_valid <= 0;
  endtask

  task automatic read_all(input int first, input int count, input fail_e c0, input fail_e c1,
                          input int chip, input int pin);
    for (int n = first; n < first + count; n++) begin
      exp_t e;
      e.n = n;
      e.cls = (n % S == 0) ? c0 : c1;
      e.chip = chip;
      e.pin = pin;
      e.half = half_phase;
      exp_q.push_back(e);
      issue(CMD_RD, n);
      repeat (half_phase ? 7 : 15) @(posedge clk);
    end
    wait (exp_q.size() == 0);
    repeat (60) @(posedge clk);
  endtask

  initial begin
    int full0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    // 1. writes
    for (int n = 0; n < NBLK; n++) begin
      blocks[n] = rand_block();
      issue(CMD_ACT, n);
      issue(CMD_WR, n);
      while (!wr_blk_ready) @(posedge clk);
      wr_blk_valid <= 1;
      wr_blk <= blocks[n];
      @(posedge clk);
      wr_blk_valid <= 0;
      n_write++;
      repeat (16) @(posedge clk);
    end
    repeat (200) @(posedge clk);
    // 2. clean read-back at the full rate
    full0 = n_fullrate;
    read_all(0, NBLK, FAIL_NONE, FAIL_NONE, 0, 0);
    checks++;
    if (n_fullrate - full0 < NBLK - 2) begin
      failures++;
      $display("only %0d of %0d blocks followed their predecessor after 16 clocks", n_fullrate - full0, NBLK - 1);
    end
    // 3a. chip slot 3 of global lane 2 (sub-rank 1, its lane 0) dead
    fault_kind = 1; fault_lane = 2; fault_bit = 3 * 8;
    read_all(0, 8, FAIL_NONE, FAIL_CHIP, 3, 0);
    // 3b. the check chip of global lane 1 (sub-rank 0, its lane 1) dead
    fault_kind = 1; fault_lane = 1; fault_bit = 64;
    read_all(8, 4, FAIL_CHIP, FAIL_NONE, 17, 0);
    // 3c. external DBUS pin 37 dead
    fault_kind = 2; fault_bit = 37;
    read_all(4, 8, FAIL_PIN, FAIL_PIN, 0, 37);
    // 3d. three chips of global lane 0 (sub-rank 0) dead
    fault_kind = 3; fault_lane = 0;
    read_all(12, 6, FAIL_UNCORR, FAIL_NONE, 0, 0);
    fault_kind = 0;
    // 4. a burst of commands to one rank fills its iABUS queue
    for (int k = 0; k < 8; k++) issue(CMD_ACT, 0, k != 7);
    repeat (100) @(posedge clk);
    // 5. 64-byte accesses: only the lower half of a block is written and read
    half_phase = 1;
    for (int n = NBLK; n < NBLK + NHALF; n++) begin
      blocks[n] = rand_block();
      blocks[n][1023:512] = '0;
      issue(CMD_WR, n);
      while (!wr_blk_ready) @(posedge clk);
      wr_blk_valid <= 1;
      wr_blk_half  <= 1;
      wr_blk <= blocks[n];
      @(posedge clk);
      wr_blk_valid <= 0;
      wr_blk_half  <= 0;
      repeat (16) @(posedge clk);
    end
    repeat (200) @(posedge clk);
    last_rd = -1;
    read_all(NBLK, NHALF, FAIL_NONE, FAIL_NONE, 0, 0);
    fault_kind = 1; fault_lane = 2; fault_bit = 5 * 8;
    read_all(NBLK, NHALF, FAIL_NONE, FAIL_CHIP, 5, 0);
    fault_kind = 0;
    half_phase = 0;
    // 6. erasure mode: chip 3 of sub-rank 1's first lane declared dead
    rd_erase_valid = 1; rd_erase_chip = 5'd3;
    fault_kind = 1; fault_lane = 2; fault_bit = 3 * 8;
    read_all(0, 8, FAIL_NONE, FAIL_CHIP, 3, 0);
    // chip 0 of sub-rank 0 declared dead, but chips 0, 2 and 5 of that lane failed
    rd_erase_chip = 5'd0;
    fault_kind = 3; fault_lane = 0;
    read_all(12, 4, FAIL_UNCORR, FAIL_NONE, 0, 0);
    fault_kind = 0;
    rd_erase_valid = 0;

    checks += 13;
    if (n_write != NBLK) failures++;
    if (n_read != NBLK + 8 + 4 + 8 + 6 + 2 * NHALF + 8 + 4) failures++;
    if (n_erase_fix == 0)  begin failures++; $display("no erased chip rebuilt"); end
    if (n_erase_flag == 0) begin failures++; $display("no failure flagged in erasure mode"); end
    if (n_half != 2 * NHALF) failures++;
    if (n_half_fullrate < 2 * NHALF - 4) begin failures++; $display("64-byte blocks not at the full rate"); end
    if (n_stall == 0)    begin failures++; $display("no ABUS stall"); end
    if (n_overlap == 0)  begin failures++; $display("sub-ranks never overlapped"); end
    if (n_fullrate == 0) begin failures++; $display("no back-to-back blocks"); end
    if (n_chip == 0)     begin failures++; $display("no chip failure corrected"); end
    if (n_pin == 0)      begin failures++; $display("no pin failure corrected"); end
    if (n_uncorr == 0)   begin failures++; $display("no uncorrectable block flagged"); end
    if (n_xlat == 0)     failures++;
    $display("writes %0d reads %0d stalls %0d sub-rank overlap cycles %0d full-rate blocks %0d",
             n_write, n_read, n_stall, n_overlap, n_fullrate);
    $display("chip corrections %0d pin corrections %0d uncorrectable %0d translated RD/WR %0d",
             n_chip, n_pin, n_uncorr, n_xlat);
    $display("64-byte blocks read %0d, of them 8 clocks after the previous one %0d",
             n_half, n_half_fullrate);
    $display("erasure mode: chip rebuilt %0d, further failure flagged %0d", n_erase_fix, n_erase_flag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
