// boom_write_split_tb: checks the write data path with the default four lanes,
// two sub-ranks and a quarter-rate iDBUS. Blocks go out back to back on the DBUS,
// alternating between the sub-ranks. Each lane must receive words
// DBUS-beat j -> lane j mod 2 of the block's sub-rank, word j div 2, in order,
// only on iDBUS beats (ce), with both lanes of a sub-rank in step, and each block
// must be on the lanes within 8 iDBUS beats plus queueing of the previous block of
// that sub-rank. Both sub-ranks must be seen writing at the same time. Every
// third block is a 64-byte one of 8 DBUS beats (4 words per lane).
module boom_write_split_tb;
  import boom_pkg::*;
  localparam int N = 4, S = 2, R = 4, L = 2, NBLK = 16;
  logic clk = 0, rst_n = 0;
  logic ce, dbus_valid = 0, order_push = 0, order_half = 0, orphan;
  logic [1:0] order_sr = '0;
  logic [LANE_W-1:0] dbus_data = '0;
  logic [N-1:0] idbus_valid;
  logic [N-1:0][LANE_W-1:0] idbus_data;
  int checks = 0, failures = 0, overlap = 0;
  int cyc = 0;

  boom_write_split #(.N_IDBUS(N), .SUBRANKS(S)) dut (.clk, .rst_n, .ce, .dbus_valid, .dbus_data,
    .order_push, .order_sr, .order_half, .idbus_valid, .idbus_data, .orphan_beat(orphan));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign ce = (cyc % R == 0);

  typedef logic [LANE_W-1:0] word_t;
  word_t blks [NBLK][16];
  int    lane_word [N];      // words seen per lane
  word_t exp_lane [N][$];    // words each lane must still deliver, in order

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (orphan) failures++;
    if (idbus_valid != '0) begin
      checks++;
      // lanes move only on the clock after an iDBUS beat strobe, and in pairs
      if ((cyc - 1) % R != 0) failures++;
      if (idbus_valid[0] != idbus_valid[1] || idbus_valid[2] != idbus_valid[3]) failures++;
      if (idbus_valid[1:0] != 0 && idbus_valid[3:2] != 0) overlap++;
      for (int i = 0; i < N; i++) if (idbus_valid[i]) begin
        checks++;
        if (exp_lane[i].size() == 0 || idbus_data[i] !== exp_lane[i].pop_front()) begin
          failures++;
          if (failures < 5) $display("lane %0d word %0d wrong", i, lane_word[i]);
        end
        lane_word[i]++;
      end
    end
  end

  initial begin
    for (int i = 0; i < N; i++) lane_word[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < NBLK; n++) begin
      int len;
      len = (n % 3 == 2) ? 8 : 16;
      for (int t = 0; t < 16; t++) blks[n][t] = {$urandom, $urandom, $urandom};
      // beat t goes to lane t mod L of the sub-rank, as its word t div L
      for (int t = 0; t < len; t++) exp_lane[(n % S) * L + t % L].push_back(blks[n][t]);
      // the write command reaches the buffer before its data
      order_push <= 1;
      order_sr   <= 2'(n % S);
      order_half <= (len == 8);
      for (int t = 0; t < len; t++) begin
        @(posedge clk);
        order_push <= 0;
        dbus_valid <= 1;
        dbus_data  <= blks[n][t];
      end
      @(posedge clk);
      // the DBUS may send a sub-rank a block only as fast as its lanes drain:
      // two sub-ranks share the DBUS, so a gap every second block
      dbus_valid <= 0;
      if (n % 2 == 1) repeat (32) @(posedge clk);
    end
    dbus_valid <= 0;
    repeat (100) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (exp_lane[i].size() != 0) begin failures++; $display("lane %0d got %0d words", i, lane_word[i]); end
    end
    checks++;
    if (overlap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
