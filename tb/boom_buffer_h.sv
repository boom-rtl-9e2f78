// boom_buffer_h: one buffer-chip configuration under test, used by
// boom_buffer_tb. Raw 72-bit beats (no ECC) are written through the buffer into
// boom_dram_model and read back; every read block must equal the written one,
// beat for beat, as 16 consecutive DBUS beats, and reads issued one per DBUS
// block time must come back at the full DBUS rate (16 clocks apart). With HALF
// set every third block is a 64-byte one (8 beats, issued 8 clocks after the
// previous read).
module boom_buffer_h
  import boom_pkg::*;
#(
  parameter int unsigned N_IDBUS  = 4,
  parameter int unsigned SUBRANKS = 2,
  parameter int unsigned RATIO    = 4,
  parameter int unsigned RANKS    = 4,
  parameter int unsigned NBLK     = 16,
  parameter bit          HALF     = 0
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   fullrate,
  output logic done
);
  logic abus_valid, abus_ready;
  ext_cmd_t abus_cmd;
  logic dbus_wr_valid, dbus_rd_valid, dbus_rd_last;
  logic [LANE_W-1:0] dbus_wr_data, dbus_rd_data;
  logic idbus_ce, iabus_slot;
  logic [N_IDBUS-1:0] iabus_valid, idbus_rd_valid, idbus_wr_valid;
  int_cmd_t [N_IDBUS-1:0] iabus_cmd;
  logic [N_IDBUS-1:0][LANE_W-1:0] idbus_rd_data, idbus_wr_data;
  logic rd_blk_start, rd_underflow, wr_orphan_beat;

  boom_buffer #(.N_IDBUS(N_IDBUS), .SUBRANKS(SUBRANKS), .RATIO(RATIO), .RANKS(RANKS)) dut (
    .clk, .rst_n, .abus_valid, .abus_cmd, .abus_ready, .dbus_wr_valid, .dbus_wr_data,
    .dbus_rd_valid, .dbus_rd_data, .dbus_rd_last, .idbus_ce, .iabus_slot, .iabus_valid, .iabus_cmd,
    .idbus_rd_valid, .idbus_rd_data, .idbus_wr_valid, .idbus_wr_data,
    .rd_blk_start, .rd_underflow, .wr_orphan_beat);

  boom_dram_model #(.N_IDBUS(N_IDBUS), .SUBRANKS(SUBRANKS), .RANKS(RANKS)) ranks (
    .clk, .rst_n, .idbus_ce, .iabus_valid, .iabus_cmd, .idbus_rd_valid, .idbus_rd_data,
    .idbus_wr_valid, .idbus_wr_data, .fault_kind(0), .fault_lane(0), .fault_bit(0));

  typedef logic [LANE_W-1:0] word_t;
  word_t blks [NBLK][16];
  int cyc = 0, t = 0, nb = 0, last_start = -100, last_len = 16;

  function automatic int len(int n);
    return (HALF && n % 3 == 2) ? 8 : 16;
  endfunction

  initial begin
    checks = 0; failures = 0; fullrate = 0; done = 0;
    abus_valid = 0; abus_cmd = '0; dbus_wr_valid = 0; dbus_wr_data = '0;
  end

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (rd_underflow || wr_orphan_beat) failures++;
    if (dbus_rd_valid) begin
      if (t == 0) begin
        if (cyc - last_start == last_len) fullrate++;
        last_start = cyc;
        last_len   = len(nb);
      end
      checks++;
      if (nb >= NBLK || dbus_rd_data !== blks[nb][t] || dbus_rd_last != (t == len(nb) - 1)) begin
        failures++;
        if (failures < 4) $display("N=%0d block %0d beat %0d wrong", N_IDBUS, nb, t);
      end
      t++;
      if (t == len(nb)) begin t = 0; nb++; end
    end else if (t != 0) begin
      failures++;
      t = 0;
    end
  end

  task automatic issue(input cmd_op_e op, input int n);
    abus_valid <= 1;
    abus_cmd.op      <= op;
    abus_cmd.half    <= (len(n) == 8);
    abus_cmd.subrank <= 2'(n % SUBRANKS);
    abus_cmd.rank    <= 3'((n / SUBRANKS) % RANKS);
    abus_cmd.bank    <= 3'(n % 8);
    abus_cmd.row     <= 16'(n);
    abus_cmd.col     <= 10'(n * 16);
    do @(posedge clk); while (!abus_ready);
    abus_valid <= 0;
  endtask

  initial begin
    wait (rst_n);
    @(posedge clk);
    for (int n = 0; n < NBLK; n++) begin
      for (int b = 0; b < 16; b++) blks[n][b] = {$urandom, $urandom, $urandom};
      issue(CMD_WR, n);
      for (int b = 0; b < len(n); b++) begin
        dbus_wr_valid <= 1;
        dbus_wr_data  <= blks[n][b];
        @(posedge clk);
      end
      dbus_wr_valid <= 0;
      repeat (4 * RATIO * 16 / (N_IDBUS / SUBRANKS) / SUBRANKS) @(posedge clk);
    end
    repeat (200) @(posedge clk);
    for (int n = 0; n < NBLK; n++) begin
      issue(CMD_RD, n);
      repeat (len(n) - 1) @(posedge clk);
    end
    wait (nb == NBLK);
    repeat (20) @(posedge clk);
    checks++;
    if (fullrate < NBLK - 2) begin
      failures++;
      $display("N=%0d: only %0d blocks at the full rate", N_IDBUS, fullrate);
    end
    done = 1;
  end
endmodule
