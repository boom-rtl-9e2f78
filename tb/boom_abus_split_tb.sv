// boom_abus_split_tb: checks the ABUS split with 4 iABUSes and 8 ranks (two per
// bus). Random commands to random ranks are offered every clock; each accepted
// command must come out, in order per bus, on iABUS rank/2 with the local rank
// rank%2 and burst 8 on reads and writes, one per slot (every 8 clocks). Accepted
// reads and writes must be flagged on rd_issue / wr_issue with their sub-rank.
// Commands to a full bus must be held off (abus_ready low), and commands to the
// other buses must meanwhile go through, so several buses carry commands in
// the same slot.
module boom_abus_split_tb;
  import boom_pkg::*;
  localparam int NB = 4, RANKS = 8;
  logic clk = 0, rst_n = 0, slot, abus_valid = 0, abus_ready, rd_issue, wr_issue;
  ext_cmd_t abus_cmd;
  logic [NB-1:0] iabus_valid;
  int_cmd_t [NB-1:0] iabus_cmd;
  logic [1:0] issue_sr;
  logic       issue_half;
  int checks = 0, failures = 0, stalls = 0, parallel = 0, rds = 0, wrs = 0;
  int cyc = 0;
  int_cmd_t exp_q [NB][$];

  boom_abus_split #(.N_IABUS(NB), .RANKS(RANKS), .LANES_PER_SR(2)) dut (.clk, .rst_n, .slot, .abus_valid,
    .abus_cmd, .abus_ready, .iabus_valid, .iabus_cmd, .rd_issue, .wr_issue, .issue_subrank(issue_sr), .issue_half);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign slot = (cyc % 8 == 0);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (abus_valid && abus_ready && abus_cmd.op != CMD_NOP) begin
      int_cmd_t e;
      e = '{op: abus_cmd.op, rank: 3'(abus_cmd.rank % 2), subrank: abus_cmd.subrank, bank: abus_cmd.bank,
            row: abus_cmd.row, col: abus_cmd.col, burst: (abus_cmd.op == CMD_RD || abus_cmd.op == CMD_WR) ? (abus_cmd.half ? 5'd4 : 5'd8) : 5'd0};
      exp_q[abus_cmd.rank / 2].push_back(e);
    end
    checks++;
    if (rd_issue != (abus_valid && abus_ready && abus_cmd.op == CMD_RD) ||
        wr_issue != (abus_valid && abus_ready && abus_cmd.op == CMD_WR) ||
        ((rd_issue || wr_issue) && (issue_sr != abus_cmd.subrank || issue_half != abus_cmd.half))) failures++;
    if (rd_issue) rds++;
    if (wr_issue) wrs++;
    if (abus_valid && !abus_ready) stalls++;
    if ($countones(iabus_valid) > 1) parallel++;
    for (int b = 0; b < NB; b++) if (iabus_valid[b]) begin
      checks++;
      if ((cyc - 1) % 8 != 0) failures++;
      if (exp_q[b].size() == 0 || iabus_cmd[b] !== exp_q[b].pop_front()) begin
        failures++;
        if (failures < 5) $display("iABUS %0d wrong command", b);
      end
    end
  end

  initial begin
    abus_cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      if (!abus_valid || abus_ready) begin
        abus_valid = ($urandom_range(2) != 0);
        abus_cmd.op = cmd_op_e'($urandom_range(5));
        // bias towards rank 0/1 so that bus 0 fills up
        abus_cmd.rank = ($urandom_range(3) == 0) ? 3'($urandom_range(1)) : 3'($urandom_range(RANKS - 1));
        abus_cmd.subrank = 2'($urandom_range(1));
        abus_cmd.half = 1'($urandom);
        abus_cmd.bank = 3'($urandom);
        abus_cmd.row = 16'($urandom);
        abus_cmd.col = 10'($urandom);
      end
    end
    @(negedge clk);
    abus_valid = 0;
    repeat (100) @(posedge clk);
    for (int b = 0; b < NB; b++) begin checks++; if (exp_q[b].size() != 0) failures++; end
    checks += 3;
    if (stalls == 0) failures++;
    if (parallel == 0) failures++;
    if (rds == 0 || wrs == 0) failures++;
    $display("stalls %0d, slots with several buses busy %0d", stalls, parallel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
