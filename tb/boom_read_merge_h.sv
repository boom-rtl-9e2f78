// boom_read_merge_h: one read-merge configuration under test, used by
// boom_read_merge_tb. Lane drivers play the DRAM of each sub-rank: a read makes
// every lane of its sub-rank deliver 16/L random words, one per iDBUS beat, all
// lanes together. Reads are ordered round-robin over the sub-ranks, one every
// ISSUE_GAP clocks. The checker expects each block on the DBUS as 16 consecutive
// beats, lanes interleaved per internal beat, blocks in read order, no underflow,
// and reports the first-word-to-first-beat latency and the DBUS utilisation.
// HALF selects 64-byte reads: 0 none, 1 all, 2 every third block. A 64-byte
// block is 8 DBUS beats from 8/L words per lane.
module boom_read_merge_h
  import boom_pkg::*;
#(
  parameter int unsigned N_IDBUS   = 4,
  parameter int unsigned SUBRANKS  = 2,
  parameter int unsigned RATIO     = 4,
  parameter int unsigned NBLK      = 20,
  parameter int unsigned ISSUE_GAP = 16,
  parameter int unsigned HALF      = 0
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   first_latency,
  output real  util,
  output logic done
);
  localparam int unsigned L = N_IDBUS / SUBRANKS;
  localparam int unsigned B = 16 / L;

  logic [N_IDBUS-1:0]             idbus_valid;
  logic [N_IDBUS-1:0][LANE_W-1:0] idbus_data;
  logic order_push;
  logic [1:0] order_sr;
  logic order_half;
  logic dbus_valid, dbus_last, blk_start, underflow;
  logic [LANE_W-1:0] dbus_data;

  boom_read_merge #(.N_IDBUS(N_IDBUS), .SUBRANKS(SUBRANKS), .RATIO(RATIO)) dut (
    .clk, .rst_n, .idbus_valid, .idbus_data, .order_push, .order_sr, .order_half,
    .dbus_valid, .dbus_data, .dbus_last, .blk_start, .underflow);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  wire ce = (cyc % RATIO == 0);

  typedef logic [LANE_W-1:0] word_t;
  word_t blks [NBLK][16];       // in DBUS order
  int    issued = 0;
  function automatic int len(int n);
    return (HALF == 1 || (HALF == 2 && n % 3 == 1)) ? 8 : 16;
  endfunction
  int   first_word_cyc = -1, first_beat_cyc = -1, last_beat_cyc = 0, beats = 0;

  initial begin
    checks = 0; failures = 0; done = 0; first_latency = -1; util = 0.0;
    idbus_valid = '0; idbus_data = '0; order_push = 0; order_sr = '0; order_half = 0;
  end

  // lane drivers, one per sub-rank
  for (genvar s = 0; s < SUBRANKS; s++) begin : g_drv
    initial begin
      wait (rst_n);
      for (int n = s; n < NBLK; n += SUBRANKS) begin
        wait (issued > n);
        for (int w = 0; w < len(n) / L; w++) begin
          do @(posedge clk); while (!ce);
          for (int j = 0; j < L; j++) begin
            idbus_valid[s * L + j] <= 1'b1;
            idbus_data[s * L + j]  <= blks[n][w * L + j];
          end
          if (first_word_cyc < 0) first_word_cyc = cyc;
          @(posedge clk);
          for (int j = 0; j < L; j++) idbus_valid[s * L + j] <= 1'b0;
        end
      end
    end
  end

  // read issue
  initial begin
    wait (rst_n);
    @(posedge clk);
    for (int n = 0; n < NBLK; n++) begin
      for (int t = 0; t < 16; t++) blks[n][t] = {$urandom, $urandom, $urandom};
      order_push <= 1'b1;
      order_sr   <= 2'(n % SUBRANKS);
      order_half <= (len(n) == 8);
      @(posedge clk);
      issued = n + 1;
      order_push <= 1'b0;
      repeat (ISSUE_GAP - 1) @(posedge clk);
    end
  end

  // DBUS checker
  int t = 0;
  int nb = 0;
  int total_beats = 0;
  initial for (int n = 0; n < NBLK; n++) total_beats += len(n);
  always @(posedge clk) if (rst_n) begin
    if (underflow) failures++;
    if (dbus_valid) begin
      if (t == 0) begin
        checks++;
        if (nb >= issued) begin failures++; $display("unexpected block"); end
      end
      if (first_beat_cyc < 0) first_beat_cyc = cyc;
      last_beat_cyc = cyc;
      beats++;
      checks++;
      if (nb >= NBLK || dbus_data !== blks[nb][t] || dbus_last != (t == len(nb) - 1)) begin
        failures++;
        if (failures < 5) $display("L=%0d beat %0d wrong", L, t);
      end
      t = (t + 1) % len(nb);
      if (t == 0) nb++;
    end else if (t != 0) begin
      failures++;
      $display("burst broken at beat %0d", t);
      t = 0;
    end
    if (beats == total_beats && !done) begin
      first_latency = first_beat_cyc - first_word_cyc;
      util = real'(beats) / real'(last_beat_cyc - first_beat_cyc + 1);
      done = 1;
    end
  end
endmodule
